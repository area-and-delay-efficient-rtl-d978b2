// tb_vedic_mult_top: end-to-end test of the arithmetic module with both
// multipliers at their default (and only) sizes.
//
// Every cycle the same random operand pair goes to the combinational
// multiplier (a, b) and, when ld is high, to the pipelined one (a1, b1). The
// combinational product is checked against the integer product at once; the
// pipelined product is checked three edges after loading against the same
// reference, and against the combinational product recorded then. It also
// runs all 256 operand pairs back to back through the pipeline.
//
// Mechanisms counted, each must occur at least once: asynchronous reset,
// back-to-back loads (one result per clock), ld low holding the operands,
// and a combinational product.
module tb_vedic_mult_top;
  logic       clk;
  logic       rst_n;
  logic [3:0] a, b, a1, b1;
  logic [7:0] q, q_pipe;
  logic       ld;
  int checks = 0, failures = 0;
  int n_reset = 0, n_b2b = 0, n_hold = 0, n_comb = 0;

  localparam int unsigned LAT = 3;

  vedic_mult_top dut (
    .clk(clk), .rst_n(rst_n),
    .a(a), .b(b), .q(q),
    .ld(ld), .a1(a1), .b1(b1), .q_pipe(q_pipe)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  int ref_q [$];   // reference product of the operand registers, per edge
  int comb_q [$];  // combinational product seen for the pair loaded
  int ma, mb, mc;
  bit prev_ld;

  initial begin
    rst_n = 1'b0; ld = 1'b0;
    a = '0; b = '0; a1 = '0; b1 = '0;
    repeat (2) @(posedge clk);
    #1 check(int'(q_pipe), 0, "q_pipe in reset");
    n_reset++;
    @(negedge clk) rst_n = 1'b1;

    ma = 0; mb = 0; mc = 0; prev_ld = 1'b0;
    // all 256 pairs back to back, then 300 random cycles with ld random
    for (int k = 0; k < 256 + 300 + LAT; k++) begin
      @(negedge clk);
      if (k < 256) begin
        ld = 1'b1;
        a = 4'(k / 16); b = 4'(k % 16);
      end else begin
        ld = ($urandom % 3) != 0;
        a = 4'($urandom); b = 4'($urandom);
      end
      a1 = a; b1 = b;
      #1;
      check(int'(q), int'(a) * int'(b), "combinational q");
      n_comb++;
      if (ld && prev_ld) n_b2b++;
      if (!ld) n_hold++;
      prev_ld = ld;
      if (ld) begin
        ma = int'(a1); mb = int'(b1); mc = int'(q);
      end
      @(posedge clk);
      #1;
      ref_q.push_back(ma * mb);
      comb_q.push_back(mc);
      if (k >= LAT) begin
        check(int'(q_pipe), ref_q[k - LAT], "pipelined q");
        check(int'(q_pipe), comb_q[k - LAT], "pipelined q against combinational q");
      end
    end

    // asynchronous reset while results are in flight
    #2 rst_n = 1'b0;
    #1 check(int'(q_pipe), 0, "q_pipe after async reset");
    n_reset++;
    rst_n = 1'b1;

    $display("resets=%0d back_to_back_loads=%0d ld_holds=%0d comb_products=%0d",
             n_reset, n_b2b, n_hold, n_comb);
    checks += 4;
    if (n_reset < 2) begin failures++; $display("FAIL async reset never exercised"); end
    if (n_b2b == 0)  begin failures++; $display("FAIL no back-to-back loads"); end
    if (n_hold == 0) begin failures++; $display("FAIL ld never held low"); end
    if (n_comb == 0) begin failures++; $display("FAIL no combinational product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
