// tb_baud_tick: checks that the tick comes every DIV clocks (100 at 50 MHz,
// i.e. 16 ticks per 31 250-baud bit), first DIV clocks after reset, and is
// exactly one clock wide. A gap of more than DIV clocks without a tick is
// a failure.
module tb_baud_tick;
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1, nticks = 0;

  baud_tick dut (.clk(clk), .rst(rst), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    forever begin
      @(posedge clk);
      cyc++;
      if (!tick && cyc - (last < 0 ? 0 : last) > 100) begin
        checks++; failures++;
        $display("FAIL no tick for more than 100 clocks (at clock %0d)", cyc);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      if (tick) begin
        checks++;
        if (last < 0) begin
          if (cyc != 100) begin failures++; $display("FAIL first tick at %0d", cyc); end
        end else if (cyc - last != 100) begin
          failures++; $display("FAIL tick spacing %0d", cyc - last);
        end
        last = cyc;
        nticks++;
        if (nticks == 50) begin
          checks++;
          if (cyc != 5000) failures++;
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
