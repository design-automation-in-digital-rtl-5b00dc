// tb_state_ram: random writes and reads against an array model; the read is
// asynchronous, reset clears all words, a same-cycle read of a written
// address returns the old word.  The behavioural and the matrix version run
// side by side on the same stimulus.
module tb_state_ram;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [2:0] wadr = '0, radr = '0;
  logic [15:0] d = '0, q, q_a;
  logic [15:0] m [8];
  state_ram #(.W(16), .DEPTH(8)) dut (.clk, .rst_n, .we, .wadr, .d, .radr, .q);
  state_ram #(.W(16), .DEPTH(8), .ASIC_STYLE(1'b1)) dut_a (.clk, .rst_n, .we, .wadr, .d, .radr, .q(q_a));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 8; i++) m[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 8; i++) begin
      radr = 3'(i); #1 checks++;
      if (q != 0) begin failures++; $display("word %0d not cleared", i); end
      checks++;
      if (q_a != 0) begin failures++; $display("matrix word %0d not cleared", i); end
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); wadr = 3'($urandom); d = 16'($urandom); radr = 3'($urandom);
      #1 checks++;
      if (q != m[radr]) begin failures++; if (failures < 10) $display("read %0d: %h expected %h", radr, q, m[radr]); end
      checks++;
      if (q_a != m[radr]) begin failures++; if (failures < 10) $display("matrix read %0d: %h expected %h", radr, q_a, m[radr]); end
      @(posedge clk);
      if (we) m[wadr] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
