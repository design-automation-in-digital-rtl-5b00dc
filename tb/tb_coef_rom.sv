// tb_coef_rom: checks the coefficient ROM.
// An instance with the default contents must return the Q1.15 values of the
// default coefficient set (0.5 -0.3 0.2 -0.1 0.25 -0.2 0.1 0.05 0.6 -0.4 0.3
// -0.2 0.15 -0.1 0.05 0.02, each rounded to the nearest multiple of 2^-15),
// and an instance with a table given here must return that table.  Each
// instance exists in both versions (behavioural table and decoder/driver
// matrix).  A 6-word ROM checks that the two unused addresses read zero.
module tb_coef_rom;
  localparam logic signed [15:0] T [16] = '{
    16'sh1111, 16'sh2222, 16'sh3333, 16'sh4444, 16'sh5555, 16'sh6666, 16'sh7777, -16'sh0001,
    16'sh0100, 16'sh0200, 16'sh0300, 16'sh0400, 16'sh0500, 16'sh0600, 16'sh0700, 16'sh0800};
  real frac [16] = '{0.5, -0.3, 0.2, -0.1, 0.25, -0.2, 0.1, 0.05, 0.6, -0.4, 0.3, -0.2, 0.15, -0.1, 0.05, 0.02};
  localparam logic signed [15:0] T6 [6] = '{16'sh0123, -16'sh0456, 16'sh7fff, -16'sh8000, 16'sh0001, -16'sh0001};

  logic [3:0] adr;
  logic [2:0] adr6;
  logic signed [15:0] q_def, q_tab, q_def_a, q_tab_a, q6, q6_a;
  coef_rom dut_def (.adr, .q(q_def));
  coef_rom #(.W(16), .DEPTH(16), .CONTENTS(T)) dut_tab (.adr, .q(q_tab));
  coef_rom #(.ASIC_STYLE(1'b1)) dut_def_a (.adr, .q(q_def_a));
  coef_rom #(.W(16), .DEPTH(16), .ASIC_STYLE(1'b1), .CONTENTS(T)) dut_tab_a (.adr, .q(q_tab_a));
  coef_rom #(.W(16), .DEPTH(6), .CONTENTS(T6)) dut6 (.adr(adr6), .q(q6));
  coef_rom #(.W(16), .DEPTH(6), .ASIC_STYLE(1'b1), .CONTENTS(T6)) dut6_a (.adr(adr6), .q(q6_a));

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int e;
      adr = 4'(i);
      #1;
      e = $rtoi(frac[i] * 32768.0 + (frac[i] < 0 ? -0.5 : 0.5));
      checks++;
      if (int'(q_def) != e) begin failures++; $display("default adr %0d: %0d expected %0d", i, q_def, e); end
      checks++;
      if (q_tab !== T[i]) begin failures++; $display("table adr %0d: %h expected %h", i, q_tab, T[i]); end
      checks++;
      if (int'(q_def_a) != e) begin failures++; $display("matrix default adr %0d: %0d expected %0d", i, q_def_a, e); end
      checks++;
      if (q_tab_a !== T[i]) begin failures++; $display("matrix table adr %0d: %h expected %h", i, q_tab_a, T[i]); end
    end
    for (int i = 0; i < 8; i++) begin
      logic signed [15:0] e6;
      adr6 = 3'(i);
      #1;
      e6 = (i < 6) ? T6[i] : '0;
      checks++;
      if (q6 !== e6) begin failures++; $display("6-word adr %0d: %h expected %h", i, q6, e6); end
      checks++;
      if (q6_a !== e6) begin failures++; $display("6-word matrix adr %0d: %h expected %h", i, q6_a, e6); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
