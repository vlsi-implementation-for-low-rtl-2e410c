// tb_symbol_timer: runs the counters with a tick that is sometimes low and
// checks sample, chip and the three strobes against a count kept here:
// a period is 32 ticks, a sequence 6 periods.
module tb_symbol_timer;
  logic       clk = 0, rst, tick;
  logic [4:0] sample;
  logic [2:0] chip;
  logic       ps, pe, se;
  int         checks = 0, failures = 0;
  int         n = 0, n_seq = 0;

  symbol_timer dut (.clk, .rst, .tick, .sample, .chip, .period_start(ps), .period_end(pe), .seq_end(se));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; tick = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      tick = ($urandom_range(3) != 0);
      #1;
      checks++;
      if (sample != 5'(n % 32) || chip != 3'((n / 32) % 6) || ps != (n % 32 == 0) ||
          pe != (n % 32 == 31) || se != (n % 192 == 191)) begin
        failures++;
        $display("FAIL n=%0d sample=%0d chip=%0d strobes=%b%b%b", n, sample, chip, ps, pe, se);
      end
      if (se) n_seq++;
      @(posedge clk);
      if (tick) n++;
      #1;
    end
    checks++;
    if (n_seq < 5) begin failures++; $display("FAIL too few sequences"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
