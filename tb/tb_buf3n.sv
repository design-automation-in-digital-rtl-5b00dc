// tb_buf3n: the bus carries the word of the one enabled driver, zero when
// none is enabled; random words and every enable pattern of one or no driver.
module tb_buf3n;
  localparam int N = 4;
  logic [N-1:0] en;
  logic [N-1:0][15:0] d;
  logic [15:0] q;
  buf3n #(.W(16), .N(N)) dut (.en, .d, .q);
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      int s;
      logic [15:0] e;
      s = $urandom_range(0, N);          // N: no driver
      for (int j = 0; j < N; j++) d[j] = 16'($urandom);
      en = (s == N) ? '0 : N'(1) << s;
      e  = (s == N) ? 16'h0 : d[s];
      #1;
      checks++;
      if (q != e) begin failures++; if (failures < 10) $display("en=%b q=%h expected %h", en, q, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
