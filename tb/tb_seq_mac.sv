// tb_seq_mac: over 50 slots, every slot must be 9 cycles long with load in
// its first cycle, se in cycles 2..8 and slot_end in the last one, starting
// right after reset.
module tb_seq_mac;
  logic clk = 1'b0, rst_n = 1'b0, load, se, slot_end;
  seq_mac #(.STEPS(8)) dut (.clk, .rst_n, .load, .se, .slot_end);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 50 * 9; c++) begin
      int p;
      p = c % 9;
      checks++;
      if (load != (p == 0) || se != (p >= 1 && p <= 7) || slot_end != (p == 8)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: load=%b se=%b end=%b", c, load, se, slot_end);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
