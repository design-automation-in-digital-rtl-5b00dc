// tb_delay_fifo: random push/pop traffic against a queue model.
// Checks the reset contents (INIT_COUNT zero words), the head word and the
// word count after every cycle, including simultaneous push and pop while
// full, and a drain to empty followed by a refill.
module tb_delay_fifo;
  localparam int DEPTH = 7;
  logic clk = 1'b0, rst_n = 1'b0, push = 1'b0, pop = 1'b0;
  logic [15:0] d = '0, q;
  logic [2:0] count;

  delay_fifo #(.W(16), .DEPTH(DEPTH), .INIT_COUNT(5)) dut (.clk, .rst_n, .push, .pop, .d, .q, .count);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, full_both = 0;
  logic [15:0] m [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (32'(count) != m.size() || (m.size() > 0 && q != m[0])) begin
      failures++;
      if (failures < 10) $display("count=%0d q=%h, model %0d %h", count, q, m.size(), m.size() > 0 ? m[0] : 16'h0);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (5) m.push_back(16'h0);
    compare();
    for (int i = 0; i < 5000; i++) begin
      bit pu, po;
      @(negedge clk);
      if (i >= 2000 && i < 2020) begin pu = 0; po = m.size() > 0; end   // drain
      else begin
        pu = $urandom_range(0, 1);
        po = $urandom_range(0, 1) && m.size() > 0;
        if (m.size() == DEPTH && pu) po = 1;
      end
      push = pu; pop = po; d = 16'($urandom);
      if (pu && po && m.size() == DEPTH) full_both++;
      @(posedge clk);
      if (po) void'(m.pop_front());
      if (pu) m.push_back(d);
      #1 compare();
    end
    checks++;
    if (full_both == 0) begin failures++; $display("push+pop while full never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
