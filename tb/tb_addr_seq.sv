// tb_addr_seq: an up and a down modulo-6 sequencer (N not a power of two)
// under random load/step, compared with a model; checks the wrap in both
// directions and load priority.
module tb_addr_seq;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  logic [2:0] start = '0, a_up, a_dn;
  addr_seq #(.N(6), .DOWN(1'b0)) up (.clk, .rst_n, .load, .start, .step, .addr(a_up));
  addr_seq #(.N(6), .DOWN(1'b1)) dn (.clk, .rst_n, .load, .start, .step, .addr(a_dn));
  always #5 clk = ~clk;
  int checks = 0, failures = 0, mu = 0, md = 0, wraps = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 9) == 0); step = 1'($urandom); start = 3'($urandom_range(0, 5));
      @(posedge clk);
      if (load) begin mu = start; md = start; end
      else if (step) begin
        if (mu == 5 || md == 0) wraps++;
        mu = (mu + 1) % 6; md = (md + 5) % 6;
      end
      #1 checks++;
      if (a_up != 3'(mu) || a_dn != 3'(md)) begin failures++; if (failures < 10) $display("up %0d/%0d down %0d/%0d", a_up, mu, a_dn, md); end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
