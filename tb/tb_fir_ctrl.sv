// tb_fir_ctrl: checks the control unit's cycle pattern for a sample: after
// an accept, TAPS operations of 9 cycles each (ld, 7 x se, then acc_en or,
// in the last one, out_en, with seq_step), first only in the first
// operation, out_valid the cycle after out_en, in_ready low throughout.
module tb_fir_ctrl;
  localparam int TAPS = 4;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic in_ready, accept, mac_ld, mac_se, first, acc_en, seq_step, out_en, out_valid;
  fir_ctrl #(.TAPS(TAPS), .STEPS(8)) dut (.clk, .rst_n, .in_valid, .in_ready, .accept,
    .mac_ld, .mac_se, .first, .acc_en, .seq_step, .out_en, .out_valid);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic expect_cyc(input bit ld, se, fi, ae, ss, oe, ov, rdy);
    checks++;
    if (mac_ld != ld || mac_se != se || (ld && first != fi) || acc_en != ae || seq_step != ss ||
        out_en != oe || out_valid != ov || in_ready != rdy) begin
      failures++;
      if (failures < 10) $display("t=%0t ld=%b se=%b first=%b acc=%b step=%b out=%b ov=%b rdy=%b", $time,
        mac_ld, mac_se, first, acc_en, seq_step, out_en, out_valid, in_ready);
    end
  endtask
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int s = 0; s < 5; s++) begin
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk); expect_cyc(0, 0, 0, 0, 0, 0, 0, 1);
      end
      in_valid = 1'b1;
      #1 checks++;
      if (!accept) begin failures++; $display("no accept"); end
      @(negedge clk) in_valid = 1'b0;
      for (int t = 0; t < TAPS; t++)
        for (int c = 0; c < 9; c++) begin
          expect_cyc(c == 0, c >= 1 && c <= 7, t == 0, c == 8 && t < TAPS - 1, c == 8, c == 8 && t == TAPS - 1, 0, 0);
          @(negedge clk);
        end
      expect_cyc(0, 0, 0, 0, 0, 0, 1, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
