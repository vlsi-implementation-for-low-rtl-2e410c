// tb_sincos_rom: checks all 128 phases of the carrier table against
// round(64 * cos(2*pi*k/128)) and round(64 * sin(2*pi*k/128)).
module tb_sincos_rom;
  import cell16_pkg::*;

  logic [6:0] phase;
  sm_t        c, s;
  int         checks = 0, failures = 0;
  logic       clk = 0;

  sincos_rom dut (.phase, .cos_o(c), .sin_o(s));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v);
    return (v < 0.0) ? -$rtoi(-v + 0.5) : $rtoi(v + 0.5);
  endfunction

  initial begin
    for (int k = 0; k < 128; k++) begin
      int ec, es;
      phase = 7'(k);
      #1;
      ec = rnd(64.0 * $cos(2.0 * 3.14159265358979 * k / 128.0));
      es = rnd(64.0 * $sin(2.0 * 3.14159265358979 * k / 128.0));
      checks++;
      if (sm_to_int(c) != ec || sm_to_int(s) != es || (c.mag == 0 && c.sign) || (s.mag == 0 && s.sign)) begin
        failures++;
        $display("FAIL k=%0d cos=%0d (%0d) sin=%0d (%0d)", k, sm_to_int(c), ec, sm_to_int(s), es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
