// tb_da_interconnect: self-checking testbench of the routing network.
//
// A small instance (2 units, 2 external channels: 6 sources, 6 sinks) is
// given random routings that include forks (one source, several sinks) and
// unconnected sources. Every source emits numbered words under the
// valid/ready rules, every sink is ready at random. The scoreboard checks
// that each sink receives exactly the words of the source it is routed to,
// in order and without loss or duplication, that a forked word moves only
// when all listeners take it, and that unrouted sources are never blocked.
module tb_da_interconnect;
  localparam int NDA = 2, NEXT = 2, N = 2 * NDA + NEXT;
  logic clk = 0, rst_n = 0;
  logic cfg_we;
  logic [2:0] cfg_sink, cfg_src;
  logic [N-1:0] src_valid, src_ready, snk_valid, snk_ready;
  logic [N-1:0][31:0] src_data, snk_data;

  da_interconnect #(.NDA(NDA), .NEXT(NEXT)) dut (
    .clk, .rst_n, .cfg_we_i(cfg_we), .cfg_sink_i(cfg_sink), .cfg_src_i(cfg_src),
    .src_valid_i(src_valid), .src_ready_o(src_ready), .src_data_i(src_data),
    .snk_valid_o(snk_valid), .snk_ready_i(snk_ready), .snk_data_o(snk_data)
  );

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int sel [N];
  int sent [N], rcvd [N], forks = 0, drops = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic route(input int t, input int s);
    @(negedge clk);
    cfg_we = 1; cfg_sink = 3'(t); cfg_src = 3'(s);
    sel[t] = s;
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    cfg_we = 0; cfg_sink = 0; cfg_src = 0; src_valid = 0; snk_ready = 0; src_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cfgn = 0; cfgn < 8; cfgn++) begin
      // new random routing, taken while no word is pending
      src_valid = 0;
      for (int t = 0; t < N; t++) route(t, $urandom_range(0, N));   // N = unconnected
      for (int s = 0; s < N; s++) begin sent[s] = 0; rcvd[s] = 0; end
      for (int cyc = 0; cyc < 300; cyc++) begin
        @(negedge clk);
        for (int s = 0; s < N; s++)
          if (!src_valid[s] && $urandom_range(0, 2) == 0) begin
            src_valid[s] = 1;
            src_data[s] = {8'(s), 24'(sent[s])};
          end
        snk_ready = N'($urandom);
        #1;
        // check the combinational routing before the edge
        for (int t = 0; t < N; t++) begin
          if (snk_valid[t]) begin
            checks++;
            if (sel[t] >= N || snk_data[t] !== src_data[sel[t]]) begin
              failures++; $display("FAIL sink %0d wrong data", t);
            end
          end
        end
        for (int t = 0; t < N; t++) begin
          automatic bit others = 1;
          for (int u = 0; u < N; u++) if (u != t && sel[u] == sel[t] && !snk_ready[u]) others = 0;
          checks++;
          if (snk_valid[t] !== (sel[t] < N && src_valid[sel[t]] && others)) begin
            failures++; $display("FAIL sink %0d valid", t);
          end
        end
        for (int s = 0; s < N; s++) begin
          automatic int listeners = 0, ready_all = 1;
          for (int t = 0; t < N; t++) if (sel[t] == s) begin
            listeners++;
            if (!snk_ready[t]) ready_all = 0;
          end
          checks++;
          if (src_ready[s] !== 1'(ready_all)) begin failures++; $display("FAIL source %0d ready", s); end
          if (src_valid[s] && src_ready[s]) begin
            if (listeners > 1) forks++;
            if (listeners == 0) drops++;
            for (int t = 0; t < N; t++) if (sel[t] == s) begin
              checks++;
              if (!snk_valid[t] || snk_data[t][23:0] !== 24'(sent[s])) begin
                failures++; $display("FAIL sink %0d missed word %0d of source %0d", t, sent[s], s);
              end
            end
          end
        end
        @(posedge clk);
        for (int s = 0; s < N; s++)
          if (src_valid[s] && src_ready[s]) begin sent[s]++; src_valid[s] = 0; end
      end
    end
    checks++;
    if (forks == 0 || drops == 0) begin failures++; $display("FAIL fork %0d / drop %0d never seen", forks, drops); end
    $display("forks=%0d drops=%0d", forks, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
