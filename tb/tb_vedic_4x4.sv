// tb_vedic_4x4: self-checking test of the combinational 4x4 Vedic multiplier.
// First the ten operand pairs of the published simulation run are applied
// and compared with the products printed there (0, 9, 24, 45, 40, 5, 84, 77,
// 16, 45); then all 256 operand pairs are compared with the integer product.
module tb_vedic_4x4;
  logic [3:0] a, b;
  logic [7:0] q;
  int checks = 0, failures = 0;

  // Published waveform: a counts 0..9, b and q as printed.
  localparam int unsigned NV = 10;
  localparam int VB [NV] = '{15, 9, 12, 15, 10, 1, 14, 11, 2, 5};
  localparam int VQ [NV] = '{0, 9, 24, 45, 40, 5, 84, 77, 16, 45};

  vedic_4x4 dut (.a(a), .b(b), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NV; k++) begin
      a = 4'(k);
      b = 4'(VB[k]);
      #10;
      checks++;
      if (int'(q) != VQ[k]) begin
        failures++;
        $display("FAIL waveform vector %0d: %0d*%0d got %0d expected %0d",
                 k, a, b, q, VQ[k]);
      end
    end
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (int'(q) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d", i, j, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
