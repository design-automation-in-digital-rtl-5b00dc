// tb_pipo: the register loads d only when en is high and resets to zero;
// random enables and data against a model.
module tb_pipo;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [15:0] d = '0, q, m;
  pipo #(.W(16)) dut (.clk, .rst_n, .en, .d, .q);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    d = 16'hBEEF; en = 1'b1;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (q != 0) begin failures++; $display("reset value %h", q); end
    m = 0;
    @(negedge clk) begin rst_n = 1'b1; en = 1'b0; end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = 1'($urandom); d = 16'($urandom);
      @(posedge clk);
      if (en) m = d;
      #1 checks++;
      if (q != m) begin failures++; if (failures < 10) $display("q=%h expected %h", q, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
