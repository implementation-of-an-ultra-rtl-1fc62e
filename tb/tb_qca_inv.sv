// tb_qca_inv: checks that the inverter output is the complement of its input
// for both input values, several times over.
module tb_qca_inv;
  logic a, y;
  int checks = 0, failures = 0;

  qca_inv dut (.a(a), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8; n++) begin
      a = n[0];
      #1;
      checks++;
      if (y !== (a ? 1'b0 : 1'b1)) begin
        failures++;
        $display("FAIL a=%0b y=%0b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
