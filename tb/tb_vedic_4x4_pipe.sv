// tb_vedic_4x4_pipe: self-checking test of the pipelined 4x4 Vedic multiplier.
//
//  1. Reset: every register clears, q reads 0.
//  2. Latency: one pair (15, 15) is loaded at a rising edge; q must show 225
//     after the third edge that follows, and not one edge earlier.
//  3. Published waveform: a1 = 10 and b1 counting up every half clock, so the
//     operand registers see 4, 6, 8, ... 14, 0, 2; q must step through the
//     printed values 40, 60, 80, 100, 120, 140, 0, 20, one per clock.
//  4. Random stream with ld dropping at random: a reference model of the
//     operand registers predicts q three edges later, checked every cycle.
//  5. Asynchronous reset in the middle of a stream clears q at once.
module tb_vedic_4x4_pipe;
  logic       clk;
  logic       rst_n;
  logic       ld;
  logic [3:0] a1, b1;
  logic [7:0] q;
  int checks = 0, failures = 0;
  int ld_holds = 0;

  localparam int unsigned LAT = 3;  // edges after the loading edge
  localparam int WQ [8] = '{40, 60, 80, 100, 120, 140, 0, 20};

  vedic_4x4_pipe dut (.clk(clk), .rst_n(rst_n), .ld(ld), .a1(a1), .b1(b1), .q(q));

  initial clk = 1'b0;
  always #10 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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

  int hist [$];
  int ma, mb;

  initial begin
    // 1. reset
    rst_n = 1'b0;
    ld = 1'b0;
    a1 = 4'd7;
    b1 = 4'd9;
    repeat (3) @(posedge clk);
    #1 check(int'(q), 0, "q during reset");
    @(negedge clk) rst_n = 1'b1;

    // 2. latency
    ld = 1'b1; a1 = 4'd15; b1 = 4'd15;
    @(posedge clk);              // loading edge
    #1 ld = 1'b0; a1 = 4'd0; b1 = 4'd0;
    repeat (LAT - 1) @(posedge clk);
    #1 check(int'(q), 0, "q one edge before latency");
    @(posedge clk);
    #1 check(int'(q), 225, "q at latency");

    // 3. waveform run: b1 steps every half clock, the even values are sampled
    @(negedge clk);
    ld = 1'b1; a1 = 4'd10; b1 = 4'd4;
    for (int k = 0; k < 8 + LAT; k++) begin
      @(posedge clk);
      #1;
      if (k >= LAT) check(int'(q), WQ[k - LAT], "waveform q");
      b1 = b1 + 4'd1;            // odd value, never sampled
      @(negedge clk);
      b1 = b1 + 4'd1;            // next even value
    end

    // 4. random stream against a model of the operand registers
    hist.delete();
    ma = 10; mb = int'(b1);       // sampled by the edge before the stream
    for (int k = 0; k < LAT; k++) hist.push_back(0);  // edges before the stream, not checked
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      ld = ($urandom % 4) != 0;
      a1 = 4'($urandom);
      b1 = 4'($urandom);
      if (!ld) ld_holds++;
      @(posedge clk);
      #1;
      if (ld) begin ma = int'(a1); mb = int'(b1); end
      hist.push_back(ma * mb);
      if (k >= LAT) check(int'(q), hist[k], "stream q");
    end

    // 5. asynchronous reset mid-stream
    @(negedge clk);
    ld = 1'b1; a1 = 4'd13; b1 = 4'd11;
    repeat (LAT + 1) @(posedge clk);
    #1 check(int'(q), 143, "q before async reset");
    #3 rst_n = 1'b0;
    #1 check(int'(q), 0, "q right after async reset");
    rst_n = 1'b1;

    checks++;
    if (ld_holds == 0) begin
      failures++;
      $display("FAIL ld never dropped");
    end
    $display("ld held low in %0d cycles", ld_holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
