// tb_cdma_spreader: for every chip and every combination of the four users'
// I and Q bits, checks the summed levels against the sum of
// (+-1 data) * (+-1 chip) worked out here from the sequences
// 111000, 001011, 100110, 011010 (users 0..3, chip 0 rightmost).
module tb_cdma_spreader;
  import cell16_pkg::*;

  logic [2:0] chip;
  logic [3:0] ui, uq;
  sm_t        li, lq;
  int         checks = 0, failures = 0;
  logic       clk = 0;

  localparam logic [5:0] C [4] = '{6'b111000, 6'b001011, 6'b100110, 6'b011010};

  cdma_spreader dut (.chip, .user_i(ui), .user_q(uq), .i_level(li), .q_level(lq));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 6; c++)
      for (int d = 0; d < 256; d++) begin
        int ei, eq;
        chip = 3'(c);
        ui   = d[3:0];
        uq   = d[7:4];
        #1;
        ei = 0; eq = 0;
        for (int k = 0; k < 4; k++) begin
          ei += (ui[k] ? 1 : -1) * (C[k][c] ? 1 : -1);
          eq += (uq[k] ? 1 : -1) * (C[k][c] ? 1 : -1);
        end
        checks++;
        if (sm_to_int(li) != 64 * ei || sm_to_int(lq) != 64 * eq || (li.mag == 0 && li.sign)) begin
          failures++;
          $display("FAIL chip=%0d ui=%b uq=%b: %0d %0d expected %0d %0d", c, ui, uq,
                   sm_to_int(li), sm_to_int(lq), 64 * ei, 64 * eq);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
