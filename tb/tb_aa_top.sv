// tb_aa_top - end-to-end test of aa_top at its default parameters.
//
// Every iteration drives all seven units at once: the combinational 16/8
// divider and 16-bit SQR circuits (array and lookup-table cores), the
// sequential divider and SQR circuit (one full operation each, latency
// checked: 6 and 5 cycles), and the 32/16 signed divider and 32-bit SQR
// circuit of the QR-decomposition pair. All results are compared with the
// arithmetic models. The testbench also counts how often each mechanism of
// the design was exercised and fails if one never was: left and right
// shift of the reduced quotient, saturation by the error correction,
// zero-appending pruning of dividend and divisor, LSB truncation, a zero
// dividend, forcing an even leading position odd in the SQR circuit,
// left/right root shifts, signed negative quotients, and start requests
// ignored while a sequential unit is busy.
module tb_aa_top;
  import aa_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] div_a, sqa_a, sqt_a, sdiv_a, ssqr_a;
  logic [7:0]  div_b, sdiv_b, div_q, sqa_q, sqt_q, sdiv_q, ssqr_q;
  logic        sdiv_start, sdiv_busy, sdiv_done, ssqr_start, ssqr_busy, ssqr_done;
  logic [31:0] qdiv_a, qsqr_a;
  logic [15:0] qdiv_b, qsqr_q;
  logic [16:0] qdiv_q;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_lshift = 0, n_rshift = 0, n_sat = 0, n_append_a = 0, n_append_b = 0;
  int n_trunc = 0, n_zero = 0, n_odd = 0, n_sq_left = 0, n_sq_right = 0;
  int n_neg = 0, n_ignored = 0, n_seq_div = 0, n_seq_sqr = 0;

  aa_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else
      $display("mechanism %-28s %0d", what, n);
  endtask

  // random non-overflowing 16/8 division operands, with varied magnitudes
  task automatic rand_div(output logic [15:0] av, output logic [7:0] bv);
    bv = 8'($urandom_range(255, 1) >> ($urandom % 8));
    if (bv == 0) bv = 8'd1;
    av = 16'($urandom % (int'(bv) * 256)) >> ($urandom % 16);
  endtask

  initial begin
    logic [15:0] av, sa;
    logic [7:0]  bv;
    div_a = 0; div_b = 1; sqa_a = 0; sqt_a = 0; sdiv_a = 0; sdiv_b = 1;
    ssqr_a = 0; sdiv_start = 0; ssqr_start = 0;
    qdiv_a = 0; qdiv_b = 1; qsqr_a = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int it = 0; it < 30000; it++) begin
      longint  unclamped;
      int      la, lb, cyc_d, cyc_s, las;
      longint  qm, bm, expq;
      logic [31:0] sgn, qsa;
      logic [15:0] sav;
      logic [7:0]  sbv;
      logic [7:0]  sdq, ssq;

      // operands: a few directed ones first, then random
      case (it)
        0: begin av = 16'd0;     bv = 8'd7;   sa = 16'd0;    end
        1: begin av = 16'hFEFF;  bv = 8'hFF;  sa = 16'hFFFF; end
        2: begin av = 16'd5;     bv = 8'd2;   sa = 16'd4;    end
        3: begin av = 16'h7FFF;  bv = 8'h80;  sa = 16'h0100; end
        default: begin
          rand_div(av, bv);
          sa = 16'($urandom) >> ($urandom % 16);
        end
      endcase
      rand_div(sav, sbv);
      qsa = $urandom >> ($urandom % 32);

      bm = longint'($urandom_range(32767, 1)) >> ($urandom % 15);
      if (bm == 0) bm = 1;
      qm = (longint'($urandom) % (bm * 65536)) >> ($urandom % 20);
      if (qm > 32'h7FFF_FFFF) qm = 32'h7FFF_FFFF;
      sgn = $urandom;

      @(negedge clk);
      div_a  = av;  div_b = bv;
      sqa_a  = sa;  sqt_a = sa;
      sdiv_a = sav; sdiv_b = sbv; sdiv_start = 1'b1;
      ssqr_a = sa;  ssqr_start = 1'b1;
      qdiv_a = sgn[5]  ? 32'(-qm) : 32'(qm);
      qdiv_b = sgn[17] ? 16'(-bm) : 16'(bm);
      qsqr_a = qsa;
      @(posedge clk);
      #1;

      // combinational results
      expect_eq("div", div_q, ref_aaxd(av, bv, 8, 3));
      expect_eq("sqr array", sqa_q, ref_aasr(sa, 3));
      expect_eq("sqr lut", sqt_q, ref_aasr(sa, 3));
      expq = longint'(ref_aaxd(qm, bm, 16, 10));
      if (qdiv_a[31] ^ qdiv_b[15]) expq = -expq;
      expect_eq("signed div", longint'(signed'(qdiv_q)), expq);
      expect_eq("qrd sqr", qsqr_q, ref_aasr(qsa, 3));

      // mechanism bookkeeping for the combinational units
      la = ref_lead(av);
      lb = ref_lead(bv);
      unclamped = ref_aaxd(av, bv, 40, 3);
      if (la - lb - 3 > 0) n_lshift++;
      if (la - lb - 3 < 0) n_rshift++;
      if (unclamped > 255) n_sat++;
      if (la < 5) n_append_a++;
      if (lb < 2) n_append_b++;
      if (la > 5) n_trunc++;
      if (av == 0) n_zero++;
      if (ref_lead(sa) % 2 == 0 && sa > 1) n_odd++;
      if ((ref_lead(sa) | 1) > 5) n_sq_left++;
      if ((ref_lead(sa) | 1) < 5) n_sq_right++;
      if (qdiv_q[16]) n_neg++;

      // sequential units: drop start after the accepting edge, then try a
      // second start while they are busy, with different operands
      @(negedge clk);
      sdiv_start = 1'b0;
      ssqr_start = 1'b0;
      sdiv_a = 16'hFFFF; sdiv_b = 8'd1; ssqr_a = 16'd0;
      if (sdiv_busy && ssqr_busy) begin
        sdiv_start = 1'b1;
        ssqr_start = 1'b1;
        n_ignored++;
      end
      cyc_d = 0; cyc_s = 0; las = 0;
      sdq = '0; ssq = '0;
      for (int c = 1; c <= 12 && (cyc_d == 0 || cyc_s == 0); c++) begin
        @(posedge clk);
        #1;
        sdiv_start = 1'b0;
        ssqr_start = 1'b0;
        if (sdiv_done && cyc_d == 0) begin cyc_d = c; sdq = sdiv_q; end
        if (ssqr_done && cyc_s == 0) begin cyc_s = c; ssq = ssqr_q; end
      end
      expect_eq("seq div cycles", cyc_d, 6);
      expect_eq("seq sqr cycles", cyc_s, 5);
      expect_eq("seq div", sdq, ref_aaxd(sav, sbv, 8, 3));
      expect_eq("seq sqr", ssq, ref_aasr(sa, 3));
      if (cyc_d == 6) n_seq_div++;
      if (cyc_s == 5) n_seq_sqr++;
      @(negedge clk);
    end

    need("divider left shift", n_lshift);
    need("divider right shift", n_rshift);
    need("error correction saturation", n_sat);
    need("dividend zero append", n_append_a);
    need("divisor zero append", n_append_b);
    need("dividend LSB truncation", n_trunc);
    need("zero dividend", n_zero);
    need("SQR even position made odd", n_odd);
    need("SQR root left shift", n_sq_left);
    need("SQR root right shift", n_sq_right);
    need("signed negative quotient", n_neg);
    need("start ignored while busy", n_ignored);
    need("sequential division", n_seq_div);
    need("sequential square root", n_seq_sqr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
