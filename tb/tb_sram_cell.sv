// tb_sram_cell: writes random bits with random write enables and resets and
// compares the stored bit with a reference bit kept by the testbench. Inputs
// change on the falling edge; the output is checked after each rising edge.
module tb_sram_cell;
  logic clk = 1'b0, reset, we, d, q;
  logic ref_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sram_cell dut (.clk(clk), .reset(reset), .we(we), .d(d), .q(q));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; we = 1'b0; d = 1'b0; ref_q = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (q !== 1'b0) failures++;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      reset = ($urandom_range(0, 15) == 0);
      we    = $urandom_range(0, 1) == 1;
      d     = $urandom_range(0, 1) == 1;
      @(posedge clk);
      if (reset)   ref_q = 1'b0;
      else if (we) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL n=%0d reset=%0b we=%0b d=%0b q=%0b exp=%0b", n, reset, we, d, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
