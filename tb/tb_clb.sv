// tb_clb: end-to-end test of the configurable logic block at its default size
// (4-input LUT).
//
// Each round loads a truth table and an output mode through the configuration
// port, then drives random LUT inputs. In combinational mode the output must
// equal truth[lut_in] in the same cycle; in registered mode it must equal the
// truth-table value of the inputs sampled at the previous rising edge (one
// cycle of latency), and must not move between edges. Rounds cover fixed
// functions (AND, OR, XOR, majority-of-three) and random tables, switch modes
// both ways without reloading the table, reset the block mid-run, and build a
// toggle counter by feeding the registered output back into input A with
// f = A xor B. Every mechanism is counted and each must occur at least once.
module tb_clb;
  import clb_pkg::*;

  localparam int unsigned K = LUT_K;
  localparam int unsigned N = 1 << K;

  logic clk = 1'b0, reset, cfg_we, cfg_data, clb_out;
  logic [K-1:0] lut_in;
  logic [K:0]   cfg_addr;
  logic [N-1:0] table_ref;
  out_mode_e    mode_ref;
  int checks = 0, failures = 0;
  int n_cfg_writes = 0, n_comb = 0, n_reg = 0, n_to_reg = 0, n_to_comb = 0;
  int n_reset = 0, n_toggle = 0;

  always #5 clk = ~clk;

  clb dut (
    .clk(clk), .reset(reset), .lut_in(lut_in), .cfg_we(cfg_we),
    .cfg_addr(cfg_addr), .cfg_data(cfg_data), .clb_out(clb_out)
  );

  task automatic expect_out(logic exp, string what);
    checks++;
    if (clb_out !== exp) begin
      failures++;
      $display("FAIL %s t=%0t in=%0h out=%0b exp=%0b", what, $time, lut_in, clb_out, exp);
    end
  endtask

  task automatic write_cfg(int unsigned addr, logic v);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = (K+1)'(addr); cfg_data = v;
    @(negedge clk);
    cfg_we = 1'b0;
    n_cfg_writes++;
  endtask

  task automatic load_table(logic [N-1:0] t);
    for (int unsigned i = 0; i < N; i++) write_cfg(i, t[i]);
    table_ref = t;
  endtask

  task automatic set_mode(out_mode_e m);
    write_cfg(cfg_mode_addr(K), m);
    if (m != mode_ref) begin
      if (m == OUT_REG) n_to_reg++;
      else              n_to_comb++;
    end
    mode_ref = m;
  endtask

  // Random inputs for a number of cycles, checked according to mode_ref.
  task automatic run(int cycles, string what);
    logic [K-1:0] prev;
    logic         held;
    @(negedge clk);
    lut_in = K'($urandom);
    for (int c = 0; c < cycles; c++) begin
      prev = lut_in;
      #1;
      if (mode_ref == OUT_COMB) begin
        expect_out(table_ref[prev], {what, " comb"});
        n_comb++;
      end
      held = clb_out;
      @(posedge clk); #1;
      if (mode_ref == OUT_REG) begin
        expect_out(table_ref[prev], {what, " reg"});
        n_reg++;
        held = clb_out;
      end
      @(negedge clk);
      lut_in = K'($urandom);
      #1;
      // Between edges a registered output holds its value.
      if (mode_ref == OUT_REG) expect_out(held, {what, " reg hold"});
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; cfg_we = 1'b0; cfg_addr = '0; cfg_data = 1'b0; lut_in = '0;
    table_ref = '0; mode_ref = OUT_COMB;
    @(negedge clk); @(negedge clk);
    reset = 1'b0; n_reset++;
    // After reset: empty table, combinational output.
    run(4, "reset state");

    load_table(16'h8000); run(20, "AND4");
    load_table(16'hFFFE); run(20, "OR4");
    set_mode(OUT_REG);    run(20, "OR4");
    load_table(16'h6996); run(30, "XOR4");
    set_mode(OUT_COMB);   run(30, "XOR4");
    // Majority of A, B, C (D ignored), the QCA primitive as a LUT function.
    load_table(16'hE8E8); run(20, "MAJ3");
    set_mode(OUT_REG);    run(20, "MAJ3");

    for (int r = 0; r < 20; r++) begin
      load_table(N'($urandom));
      set_mode($urandom_range(0, 1) == 1 ? OUT_REG : OUT_COMB);
      run(25, "random");
    end

    // Reset in registered mode clears the flip-flop, table and mode.
    set_mode(OUT_REG);
    load_table(16'hFFFF);
    run(3, "ones");
    @(negedge clk); reset = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (clb_out !== 1'b0) begin
      failures++;
      $display("FAIL clb_out not cleared by reset");
    end
    @(negedge clk); reset = 1'b0; n_reset++;
    table_ref = '0; mode_ref = OUT_COMB;
    run(8, "after reset");

    // Toggle counter: out(n+1) = out(n) xor B, with out fed back into A.
    load_table(16'h6666);  // bit i = i[0] ^ i[1]
    set_mode(OUT_REG);
    begin
      logic q_ref, en;
      @(negedge clk);
      q_ref = clb_out;
      for (int c = 0; c < 64; c++) begin
        en = $urandom_range(0, 1) == 1;
        lut_in = {2'b00, en, clb_out};
        @(posedge clk); #1;
        q_ref = q_ref ^ en;
        expect_out(q_ref, "toggle counter");
        if (en) n_toggle++;
        @(negedge clk);
      end
    end

    $display("mechanisms: cfg_writes=%0d comb=%0d reg=%0d to_reg=%0d to_comb=%0d reset=%0d toggles=%0d",
             n_cfg_writes, n_comb, n_reg, n_to_reg, n_to_comb, n_reset, n_toggle);
    checks++; if (n_cfg_writes == 0) failures++;
    checks++; if (n_comb == 0)       failures++;
    checks++; if (n_reg == 0)        failures++;
    checks++; if (n_to_reg == 0)     failures++;
    checks++; if (n_to_comb == 0)    failures++;
    checks++; if (n_reset < 2)       failures++;
    checks++; if (n_toggle == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
