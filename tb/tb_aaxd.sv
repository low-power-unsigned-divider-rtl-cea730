// tb_aaxd - checks the 16/8 approximate divider (K = 3) against the
// arithmetic model Q = min(floor(Ap/Bp) * 2^(lA-lB-K), 2^8-1) on directed
// corner cases and random non-overflowing inputs, and checks that the error
// distance to the exact quotient never exceeds the analytical bound
// ceil((2^n-1)(2^(n-k)-1)/(2^(n-1)+2^(n-k)-1)) = 50.
module tb_aaxd;
  import aa_ref_pkg::*;
  localparam int N = 8, K = 3;
  logic [15:0] a;
  logic [7:0]  b, q;
  int checks = 0, failures = 0;
  longint unsigned bound, ed_max;

  aaxd #(.N(N), .K(K)) dut (.a(a), .b(b), .q(q));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] av, input logic [7:0] bv);
    longint unsigned exp_q, exact, ed;
    a = av;
    b = bv;
    #1;
    exp_q = ref_aaxd(av, bv, N, K);
    checks++;
    if (longint'(q) != exp_q) begin
      failures++;
      if (failures < 10) $display("FAIL %0d/%0d: q=%0d expected %0d", av, bv, q, exp_q);
    end
    if ((av >> 8) < bv) begin
      exact = av / bv;
      ed = (exact > q) ? exact - q : q - exact;
      if (ed > ed_max) ed_max = ed;
      checks++;
      if (ed > bound) begin
        failures++;
        $display("FAIL bound %0d/%0d: q=%0d exact=%0d", av, bv, q, exact);
      end
    end
  endtask

  initial begin
    bound  = div_ed_bound(N, K);
    ed_max = 0;
    // directed: zero dividend, tiny operands, saturation, large shifts
    check(16'd0, 8'd1);
    check(16'd0, 8'd200);
    check(16'd1, 8'd1);
    check(16'd7, 8'd3);
    check(16'd255, 8'd1);
    check(16'hFFFF, 8'hFF);
    check(16'hFEFF, 8'hFF);
    check(16'h7FFF, 8'h80);
    check(16'h8000, 8'hFF);
    check(16'd100, 8'd200);
    check(16'h00FF, 8'h01);
    // exact when both operands are small and the quotient is only shifted
    // right (l_A - l_B <= K)
    for (int av = 0; av < 32; av++)
      for (int bv = 1; bv < 4; bv++) begin
        check(16'(av), 8'(bv));
        if (ref_lead(av) - ref_lead(bv) > K) continue;
        checks++;
        if (int'(q) != av / bv) begin
          failures++;
          $display("FAIL small %0d/%0d: q=%0d", av, bv, q);
        end
      end
    // random, non-overflowing
    for (int i = 0; i < 200000; i++) begin
      logic [7:0]  bv;
      logic [15:0] av;
      bv = 8'($urandom_range(255, 1)) >> ($urandom % 8);
      if (bv == 0) bv = 1;
      av = 16'($urandom % (int'(bv) * 256)) >> ($urandom % 16);
      check(av, bv);
    end
    $display("ED_max over the run: %0d (bound %0d)", ed_max, bound);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
