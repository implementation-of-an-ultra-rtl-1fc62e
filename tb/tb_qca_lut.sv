// tb_qca_lut: loads the 4-input lookup table with fixed and random truth
// tables through its configuration port and reads every input pattern back.
// The expected output is the testbench's own copy of the table indexed by the
// input pattern (bit 0 = A). Also checks that a write shows one clock later,
// that writing one cell leaves the others alone, and that reset clears the
// table.
module tb_qca_lut;
  localparam int unsigned K = 4;
  localparam int unsigned N = 1 << K;

  logic clk = 1'b0, reset, cfg_we, cfg_data, lut_out;
  logic [K-1:0] cfg_addr, sel;
  logic [N-1:0] table_ref;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  qca_lut #(.K(K)) dut (
    .clk(clk), .reset(reset), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
    .cfg_data(cfg_data), .sel(sel), .lut_out(lut_out)
  );

  task automatic write_cell(int unsigned addr, logic bit_v);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = K'(addr); cfg_data = bit_v;
    @(negedge clk);
    cfg_we = 1'b0;
    table_ref[addr] = bit_v;
  endtask

  task automatic load(logic [N-1:0] t);
    for (int unsigned i = 0; i < N; i++) write_cell(i, t[i]);
  endtask

  task automatic sweep(string what);
    for (int unsigned v = 0; v < N; v++) begin
      sel = K'(v);
      #1;
      checks++;
      if (lut_out !== table_ref[v]) begin
        failures++;
        $display("FAIL %s sel=%0d out=%0b exp=%0b", what, v, lut_out, table_ref[v]);
      end
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; cfg_we = 1'b0; cfg_addr = '0; cfg_data = 1'b0; sel = '0;
    table_ref = '0;
    @(negedge clk); reset = 1'b0;
    sweep("after reset");
    // Boolean functions of A..D: AND, OR, XOR, A&B | C&D, and one-hot tables.
    load(16'h8000); sweep("AND4");
    load(16'hFFFE); sweep("OR4");
    load(16'h6996); sweep("XOR4");
    load(16'hF888); sweep("AB+CD");
    for (int unsigned i = 0; i < N; i++) begin
      load(N'(1) << i); sweep("one-hot");
    end
    for (int r = 0; r < 40; r++) begin
      load(N'($urandom)); sweep("random");
    end
    // Single-cell rewrite: the new value appears one clock after the write.
    for (int r = 0; r < 40; r++) begin
      int unsigned a;
      logic nv;
      a = $urandom_range(0, N - 1);
      nv = ~table_ref[a];
      @(negedge clk);
      sel = K'(a); cfg_we = 1'b1; cfg_addr = K'(a); cfg_data = nv;
      #1;
      checks++;
      if (lut_out !== table_ref[a]) begin
        failures++;
        $display("FAIL write visible before clock edge");
      end
      @(negedge clk);
      cfg_we = 1'b0;
      table_ref[a] = nv;
      sweep("rewrite");
    end
    // Reset clears the table.
    @(negedge clk); reset = 1'b1;
    @(negedge clk); reset = 1'b0;
    table_ref = '0;
    sweep("cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
