// tb_byte_reg: stores on set, clears on clear, set wins over clear, reset
// clears, and the held byte survives a clear.
module tb_byte_reg;
  logic clk = 0, rst = 1, set_flag = 0, clr_flag = 0, flag;
  logic [7:0] data_in = 0, data_out;
  int checks = 0, failures = 0;

  byte_reg dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] v;
    @(posedge clk); @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(!flag && data_out == 0, "reset state");
    for (int i = 0; i < 20; i++) begin
      v = 8'($urandom);
      data_in <= v; set_flag <= 1;
      @(posedge clk); set_flag <= 0; data_in <= ~v;
      @(posedge clk);
      check(flag && data_out == v, $sformatf("store %h got %h", v, data_out));
      clr_flag <= 1;
      @(posedge clk); clr_flag <= 0;
      @(posedge clk);
      check(!flag && data_out == v, "clear keeps byte");
    end
    data_in <= 8'h5a; set_flag <= 1; clr_flag <= 1;
    @(posedge clk); set_flag <= 0; clr_flag <= 0;
    @(posedge clk);
    check(flag && data_out == 8'h5a, "set wins over clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
