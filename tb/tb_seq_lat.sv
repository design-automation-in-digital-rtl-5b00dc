// tb_seq_lat: drives slot_end every 9th cycle for three sample periods and
// compares the control word of every cycle with a table written out from the
// schedule: operand sources, subtract flag, mac2 activity and the strobes,
// including the push strobes one cycle after the end of a slot.
module tb_seq_lat;
  import lattice_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, slot_end = 1'b0;
  ctl_t ctl;
  seq_lat #(.N_SLOTS(16)) dut (.clk, .rst_n, .slot_end, .ctl);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // per slot:                   0  1  2  3  4  5  6  7  8  9 10 11 12 13 14 15
  localparam int X1 [16]    = '{ 0, 1, 1, 1, 1, 1, 1, 1, 2, 2, 2, 2, 2, 2, 2, 3};
  localparam int D1 [16]    = '{ 0, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1};
  localparam int X2 [16]    = '{ 1, 0, 0, 0, 0, 0, 0, 0,-1,-1, 1, 1, 1, 1, 1, 1};
  localparam bit SUB [16]   = '{ 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 1, 1};
  localparam bit M2 [16]    = '{ 1, 1, 1, 1, 1, 1, 1, 1, 0, 0, 1, 1, 1, 1, 1, 1};
  localparam bit FPOP [16]  = '{ 0, 1, 1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam bit IPOP [16]  = '{ 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 1, 0};
  localparam bit IPUSH [16] = '{ 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1};

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit last_end;
    int last_slot;
    last_end = 0; last_slot = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 3 * 16 * 9; c++) begin
      int s, p;
      logic [3:0] ex1;
      logic [1:0] ed1, ex2;
      bit e_end;
      s = (c / 9) % 16; p = c % 9;
      e_end = (p == 8);
      slot_end = e_end;
      #1;
      ex1 = 4'(1) << X1[s];
      ed1 = 2'(1) << D1[s];
      ex2 = (X2[s] < 0) ? 2'b00 : 2'(1) << X2[s];
      checks++;
      if (ctl.rom_adr != 4'(s) || ctl.x1_en != ex1 || ctl.d1_en != ed1 || ctl.x2_en != ex2 ||
          ctl.mac1_sub != SUB[s] || ctl.mac2_en != M2[s] ||
          ctl.fir_pop != (e_end && FPOP[s]) || ctl.iir_pop != (e_end && IPOP[s]) ||
          ctl.lat1_en != e_end || ctl.lat2_en != (e_end && M2[s]) || ctl.hold_en != e_end ||
          ctl.in_take != (e_end && s == 15) || ctl.out_load != (e_end && s == 15) ||
          ctl.fir_push != (last_end && FPOP[last_slot]) ||
          ctl.iir_push != (last_end && IPUSH[last_slot])) begin
        failures++;
        if (failures < 10) $display("cycle %0d slot %0d: ctl=%h", c, s, ctl);
      end
      last_end = e_end; last_slot = s;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
