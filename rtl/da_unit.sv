// da_unit: the enhanced distributed-arithmetic (DA) functional unit.
//
// A DA unit computes an inner product y = sum_k a_k x_k of ROWS (=4) inputs
// bit-serially: the input words sit in the shift memory, each cycle one bit
// column of all inputs addresses a 16-word LUT holding every sum of the
// constant coefficients, and the looked-up word is added into a doubling
// accumulator (MSB first, the sign-bit column subtracted). Besides this, the
// unit reuses the same accumulator, two operand registers and the LUT to
// perform serial multiplication, division, square root, addition and the
// complex add / subtract / multiply needed by an FFT butterfly.
//
// Operation runs in four phases (phase_o): IDLE (sleep, nothing clocked,
// entered while cfg.en = 0), IN (operands taken from the two input channels),
// EXEC (the serial computation) and OUT (results offered on the two output
// channels; the forwarded delay-line word of a DOT unit is already offered
// during EXEC). The unit then returns to IN for its next operation.
//
// Configuration port: cfg_addr_i 0..15 writes a LUT word, 16 writes the
// 12-bit configuration word (da_pkg::cfg_t), which also restarts the unit.
//
// Channels are synchronous valid/ready: a word moves on a clock edge where
// valid and ready are both high. Channel data is 32 bits; real operands use
// the low 16 bits, complex ones are {re[31:16], im[15:0]} in Q1.15.
//
// Functions and processing cycles (BW = configured input bit width):
//   DOT  in a: one new sample pushed into the delay line (or 4 words with
//        cfg.blk); out a: 32-bit sum; out b: the evicted sample (cfg.fwd).
//        BW cycles; only the BW most significant bits of each input are used
//        and the result is rescaled by 2^(16-BW).
//   MUL  a[15:0] * b[15:0] signed, multiplier b truncated to BW bits; BW cycles
//   DIV  unsigned a[15:0] / b[15:0] -> {remainder, quotient}; 16 cycles
//   SQRT floor(sqrt(a)) of unsigned 32-bit a, non-restoring; 16 cycles
//   ADD  a + b (32 bit); 1 cycle
//   CADD, CSUB  complex a +/- b, both halves in one cycle of the split
//        accumulator; 1 cycle
//   CMUL complex a * b in Q1.15, b (the twiddle) truncated to BW bits;
//        4 serial products, 4*BW cycles
//   POLY p(x) = c_N x^N + ... + c_0 in Q1.15 by Horner's rule, x = a[15:0],
//        c_k in LUT word k, degree N (1..15) in the bit-width field; each
//        step is a 16-cycle serial multiply whose last cycle also adds the
//        next coefficient, 16*N cycles
// With cfg.cst_b, operand b is not read from a channel but taken from LUT
// word 0 (real) or words {0,1} (complex), e.g. a twiddle factor.
// From the edge that accepts the last operand, the result is valid after
// (processing cycles + 1) edges.
//
// The inner-product datapath, the four phases, the split accumulator, the
// parallel-loaded shift memory and the 12-bit configuration word follow the
// architecture. The field layout, the function codes, the channel protocol,
// the algorithms of the individual functions and their cycle counts are this
// design's own choices.
module da_unit
  import da_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration
  input  logic                  cfg_we_i,
  input  logic [4:0]            cfg_addr_i,
  input  logic [DW-1:0]         cfg_wdata_i,
  // input channels (0 = a, 1 = b)
  input  logic [1:0]            in_valid_i,
  output logic [1:0]            in_ready_o,
  input  logic [1:0][AW-1:0]    in_data_i,
  // output channels (0 = result, 1 = forwarded delay-line word)
  output logic [1:0]            out_valid_o,
  input  logic [1:0]            out_ready_i,
  output logic [1:0][AW-1:0]    out_data_o,
  output phase_e                phase_o
);

  // ------------------------------------------------------------------
  // state
  cfg_t          cfg;
  phase_e        phase;
  logic          got_a, got_b, sent_a, sent_b;
  logic [1:0]    row_cnt;
  logic [4:0]    cnt;
  logic [1:0]    k;                 // CMUL product index
  logic [3:0]    pk;                // POLY coefficient index
  logic [AW-1:0] opa, opb, sum, res;
  logic [DW-1:0] evict_q;

  // ------------------------------------------------------------------
  // sub-blocks
  logic            mem_en, push, load;
  logic [3:0]      col;
  logic [ROWS-1:0] ydo;
  logic [DW-1:0]   xdo [ROWS];
  logic [DW-1:0]   evict;
  logic [DW-1:0]   lut_rd, lut_w0, lut_w1;
  logic            lut_we;
  logic [3:0]      lut_ra;
  acc_op_e         acc_op;
  logic [AW-1:0]   acc_d, acc_q, acc_nxt;
  logic            acc_en;

  da_shift_mem #(.ROWS(ROWS), .WIDTH(DW)) u_mem (
    .clk, .rst_n, .mem_en,
    .push_i(push), .load_i(load), .load_row_i(row_cnt),
    .din_i(in_data_i[0][DW-1:0]), .col_i(col),
    .ydo_o(ydo), .xdo_o(xdo), .evict_o(evict)
  );

  da_lut #(.DEPTH(LUT_N), .WIDTH(DW)) u_lut (
    .clk, .we_i(lut_we), .waddr_i(cfg_addr_i[3:0]), .wdata_i(cfg_wdata_i),
    .raddr_i(lut_ra), .rdata_o(lut_rd), .word0_o(lut_w0), .word1_o(lut_w1)
  );

  da_accum #(.HW(DW)) u_acc (
    .clk, .rst_n, .en_hi_i(acc_en), .en_lo_i(acc_en),
    .op_i(acc_op), .d_i(acc_d), .q_o(acc_q), .nxt_o(acc_nxt)
  );

  // ------------------------------------------------------------------
  // decode
  logic          need_b, fwd_on, ops_done, acc_preload;
  logic [4:0]    bw_m1;
  logic [3:0]    sh;                // rescale shift 16 - BW
  logic [AW-1:0] b_eff;
  logic          acc_a, acc_b;      // channel handshakes this cycle
  logic          snd_a, snd_b;

  assign bw_m1  = {1'b0, cfg.bw_m1};
  assign sh     = 4'd15 - cfg.bw_m1;
  assign need_b = !cfg.cst_b && (cfg.func inside {F_MUL, F_DIV, F_ADD, F_CADD, F_CSUB, F_CMUL});
  assign fwd_on = cfg.func == F_DOT && !cfg.blk && cfg.fwd;
  assign b_eff  = cfg.cst_b ? ((cfg.func == F_CMUL) ? {lut_w0, lut_w1}
                                                    : {{DW{lut_w0[DW-1]}}, lut_w0})
                            : opb;
  assign acc_preload = cfg.func inside {F_ADD, F_CADD, F_CSUB};

  assign in_ready_o[0] = (phase == PH_IN) && !got_a;
  assign in_ready_o[1] = (phase == PH_IN) && need_b && !got_b;
  assign acc_a = in_valid_i[0] && in_ready_o[0];
  assign acc_b = in_valid_i[1] && in_ready_o[1];
  assign ops_done = got_a && (got_b || !need_b);

  assign out_valid_o[0] = (phase == PH_OUT) && !sent_a;
  // the forwarded delay-line word is offered as soon as it has been captured,
  // so the next unit of a chain can take it while this one is processing
  assign out_valid_o[1] = (phase inside {PH_EXEC, PH_OUT}) && fwd_on && !sent_b;
  assign out_data_o[0]  = res;
  assign out_data_o[1]  = {{DW{evict_q[DW-1]}}, evict_q};
  assign snd_a = out_valid_o[0] && out_ready_i[0];
  assign snd_b = out_valid_o[1] && out_ready_i[1];

  assign phase_o = phase;
  assign mem_en  = phase != PH_IDLE;
  assign acc_en  = phase != PH_IDLE;
  assign lut_we  = cfg_we_i && !cfg_addr_i[4];
  // the LUT is addressed by the bit column, or by the coefficient index
  assign lut_ra  = (cfg.func != F_POLY) ? ydo
                 : (phase == PH_IN) ? cfg.bw_m1 : pk - 4'd1;
  assign push    = acc_a && cfg.func == F_DOT && !cfg.blk;
  assign load    = acc_a && cfg.func == F_DOT &&  cfg.blk;

  // ------------------------------------------------------------------
  // processing step (combinational)
  logic [3:0]    bit_j;             // bit column / multiplier bit, MSB first
  logic          first, last;
  logic [AW-1:0] mcand;             // multiplicand / LUT word, sign-extended
  logic [DW-1:0] mplier;
  logic          mbit;
  logic [AW-1:0] prod;              // finished product, rescaled
  logic [AW-1:0] div_s;
  logic signed [AW-1:0] sq_r, sq_rn;
  logic [AW-1:0] sq_q, sq_qn;
  logic [DW-1:0] cm_re;             // CMUL partial results
  logic [AW-1:0] cm_t;
  logic [DW-1:0] hn;                // POLY: next Horner value

  always_comb begin
    bit_j  = 4'd15 - cnt[3:0];
    col    = bit_j;
    first  = (cnt == 5'd0);
    last   = (cnt == bw_m1);
    mcand  = '0;
    mplier = '0;
    unique case (k)
      2'd0: begin mcand = {{DW{opa[AW-1]}}, opa[AW-1:DW]}; mplier = b_eff[AW-1:DW]; end
      2'd1: begin mcand = {{DW{opa[DW-1]}}, opa[DW-1:0]};  mplier = b_eff[DW-1:0];  end
      2'd2: begin mcand = {{DW{opa[AW-1]}}, opa[AW-1:DW]}; mplier = b_eff[DW-1:0];  end
      default: begin mcand = {{DW{opa[DW-1]}}, opa[DW-1:0]}; mplier = b_eff[AW-1:DW]; end
    endcase
    if (cfg.func == F_MUL) begin
      mcand  = {{DW{opa[DW-1]}}, opa[DW-1:0]};
      mplier = b_eff[DW-1:0];
    end else if (cfg.func == F_DOT) begin
      mcand  = {{DW{lut_rd[DW-1]}}, lut_rd};
      mplier = '1;
    end else if (cfg.func == F_POLY) begin
      mcand  = {{DW{sum[DW-1]}}, sum[DW-1:0]};
      mplier = opa[DW-1:0];
      last   = (cnt == 5'd15);
    end
    mbit  = mplier[bit_j];
    prod  = acc_nxt << sh;

    // restoring division step on {remainder, quotient}
    div_s = (first ? {{DW{1'b0}}, opa[DW-1:0]} : acc_q) << 1;
    if (div_s[AW-1:DW] >= b_eff[DW-1:0]) begin
      div_s[AW-1:DW] = div_s[AW-1:DW] - b_eff[DW-1:0];
      div_s[0]       = 1'b1;
    end

    // non-restoring square-root step
    sq_r = first ? '0 : $signed(acc_q);
    sq_q = first ? '0 : sum;
    if (sq_r >= 0) sq_rn = $signed({sq_r[AW-3:0], opa[AW-1:AW-2]}) - $signed({sq_q[AW-3:0], 2'b01});
    else           sq_rn = $signed({sq_r[AW-3:0], opa[AW-1:AW-2]}) + $signed({sq_q[AW-3:0], 2'b11});
    sq_qn = {sq_q[AW-2:0], ~sq_rn[AW-1]};

    cm_t  = (k == 2'd1) ? (sum - prod) : (sum + prod);
    cm_re = cm_t[AW-2:DW-1];
    hn    = acc_nxt[AW-2:DW-1] + lut_rd;

    // accumulator control
    acc_op = ACC_HOLD;
    acc_d  = '0;
    if (phase == PH_IN) begin
      if (acc_a && acc_preload) begin
        acc_op = ACC_LOAD;
        acc_d  = in_data_i[0];
      end
    end else if (phase == PH_EXEC) begin
      unique case (cfg.func)
        F_DOT, F_MUL, F_CMUL, F_POLY: begin
          acc_d  = mbit ? ((bit_j == 4'd15) ? -mcand : mcand) : '0;
          acc_op = first ? ACC_LOAD : ACC_SHADD;
        end
        F_DIV:  begin acc_op = ACC_LOAD; acc_d = div_s; end
        F_SQRT: begin acc_op = ACC_LOAD; acc_d = sq_rn; end
        F_ADD:  begin acc_op = ACC_ADD;  acc_d = b_eff; end
        F_CADD: begin acc_op = ACC_SADD; acc_d = b_eff; end
        F_CSUB: begin acc_op = ACC_SSUB; acc_d = b_eff; end
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // phase sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg     <= '0;
      phase   <= PH_IDLE;
      {got_a, got_b, sent_a, sent_b} <= '0;
      row_cnt <= '0;
      cnt     <= '0;
      k       <= '0;
      pk      <= '0;
      opa     <= '0;
      opb     <= '0;
      sum     <= '0;
      res     <= '0;
      evict_q <= '0;
    end else if (cfg_we_i && cfg_addr_i == 5'(REG_CFG)) begin
      cfg     <= cfg_t'(cfg_wdata_i[CFG_W-1:0]);
      phase   <= cfg_wdata_i[CFG_W-1] ? PH_IN : PH_IDLE;
      {got_a, got_b, sent_a, sent_b} <= '0;
      row_cnt <= '0;
    end else begin
      unique case (phase)
        PH_IDLE: ;
        PH_IN: begin
          if (acc_a) begin
            if (cfg.func == F_DOT && cfg.blk) begin
              row_cnt <= row_cnt + 2'd1;
              if (row_cnt == 2'(ROWS - 1)) got_a <= 1'b1;
            end else begin
              got_a <= 1'b1;
            end
            if (push) evict_q <= evict;
            opa <= in_data_i[0];
          end
          if (acc_b) begin
            got_b <= 1'b1;
            opb   <= in_data_i[1];
          end
          if (ops_done) begin
            phase <= PH_EXEC;
            cnt   <= '0;
            k     <= '0;
            pk    <= cfg.bw_m1;
            if (cfg.func == F_POLY) sum <= {{DW{lut_rd[DW-1]}}, lut_rd};   // c_N
          end
        end
        PH_EXEC: begin
          cnt <= cnt + 5'd1;
          if (snd_b) sent_b <= 1'b1;
          unique case (cfg.func)
            F_DOT, F_MUL: if (last) begin res <= prod; phase <= PH_OUT; end
            F_CMUL: if (last) begin
              cnt <= '0;
              k   <= k + 2'd1;
              unique case (k)
                2'd0, 2'd2: sum <= prod;
                2'd1:       res[AW-1:DW] <= cm_re;
                default: begin res[DW-1:0] <= cm_re; phase <= PH_OUT; end
              endcase
            end
            F_POLY: if (last) begin
              cnt <= '0;
              pk  <= pk - 4'd1;
              sum <= {{DW{hn[DW-1]}}, hn};
              if (pk == 4'd1) begin res <= {{DW{hn[DW-1]}}, hn}; phase <= PH_OUT; end
            end
            F_DIV: if (cnt == 5'd15) begin res <= div_s; phase <= PH_OUT; end
            F_SQRT: begin
              sum <= sq_qn;
              opa <= opa << 2;
              if (cnt == 5'd15) begin res <= {{DW{1'b0}}, sq_qn[DW-1:0]}; phase <= PH_OUT; end
            end
            default: begin res <= acc_nxt; phase <= PH_OUT; end
          endcase
        end
        PH_OUT: begin
          if (snd_a) sent_a <= 1'b1;
          if (snd_b) sent_b <= 1'b1;
          if ((sent_a || snd_a) && (sent_b || snd_b || !fwd_on)) begin
            phase <= PH_IN;
            {got_a, got_b, sent_a, sent_b} <= '0;
            row_cnt <= '0;
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // channel rules: an offered word stays unchanged until it is taken
  for (genvar c = 0; c < 2; c++) begin : g_chk
    a_out_stable: assert property (@(posedge clk) disable iff (!rst_n || cfg_we_i)
      out_valid_o[c] && !out_ready_i[c] |=> out_valid_o[c] && $stable(out_data_o[c]));
  end

endmodule
