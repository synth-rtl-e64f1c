// tb_midi_interface: serial bytes in, reader side out. For each byte the
// testbench waits for status bit 0, checks the data register, clears the
// flag and checks that status drops two clocks after the clear and that bits
// 7:1 of status stay zero.
module tb_midi_interface;
  logic clk = 0, rst = 1, rx = 1, clr_flag = 0;
  logic [7:0] data_out, status_out;
  int checks = 0, failures = 0;

  midi_interface dut (.*);
  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(input logic [7:0] b);
    rx <= 0; repeat (1600) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx <= b[i]; repeat (1600) @(posedge clk); end
    rx <= 1; repeat (1600) @(posedge clk);
  endtask

  initial begin
    logic [7:0] b;
    int waited;
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    check(status_out == 0, "status clear after reset");
    for (int i = 0; i < 16; i++) begin
      b = 8'($urandom);
      fork send(b); join_none
      waited = 0;
      while (!status_out[0] && waited < 40000) begin @(posedge clk); waited++; end
      check(status_out[0] && status_out[7:1] == 0, "flag raised");
      check(data_out == b, $sformatf("byte %h got %h", b, data_out));
      check(waited > 14000 && waited < 15500, $sformatf("flag after %0d clocks", waited));
      clr_flag <= 1; @(posedge clk); clr_flag <= 0;
      @(posedge clk);
      check(status_out[0] == 1, "flag still visible one clock after clear");
      @(posedge clk);
      check(status_out[0] == 0, "flag dropped two clocks after clear");
      wait fork;
      repeat (100) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
