// tb_midi_uart_rx: sends random bytes as 8N1 serial frames at 31 250 baud
// (1600 clocks of 50 MHz per bit), with the 16x tick from baud_tick, and
// checks every received byte and the receive latency: data_ready must come
// 152 ticks (15 200 clocks, give or take one tick and the synchroniser) after
// the start edge. A second run sends at +/-3 % baud error.
module tb_midi_uart_rx;
  logic clk = 0, rst = 1, rx = 1, tick, data_ready;
  logic [7:0] data;
  int checks = 0, failures = 0;
  longint cyc = 0, start_cyc;
  int got = 0;
  logic [7:0] expect_q [$];

  baud_tick #(.DIV(100)) u_tick (.clk(clk), .rst(rst), .tick(tick));
  midi_uart_rx dut (.clk(clk), .rst(rst), .rx(rx), .tick(tick), .data_ready(data_ready), .data(data));

  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cyc++;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(input logic [7:0] b, input int bit_clks);
    rx <= 0; start_cyc = cyc;
    repeat (bit_clks) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rx <= b[i];
      repeat (bit_clks) @(posedge clk);
    end
    rx <= 1;
    repeat (bit_clks) @(posedge clk);
  endtask

  always @(posedge clk) if (data_ready) begin
    longint lat;
    lat = cyc - start_cyc;
    checks += 2;
    if (expect_q.size() == 0) begin failures++; $display("FAIL unexpected byte"); end
    else begin
      logic [7:0] e;
      e = expect_q.pop_front();
      if (data !== e) begin failures++; $display("FAIL got %h expected %h", data, e); end
    end
    if (lat < 15100 || lat > 15304) begin failures++; $display("FAIL latency %0d", lat); end
    got++;
  end

  initial begin
    logic [7:0] b;
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (50) @(posedge clk);
    for (int i = 0; i < 24; i++) begin
      b = (i == 0) ? 8'h90 : (i == 1) ? 8'h45 : (i == 2) ? 8'h00 : 8'($urandom);
      expect_q.push_back(b);
      send(b, 1600);
      repeat ($urandom_range(0, 3000)) @(posedge clk);
    end
    for (int i = 0; i < 8; i++) begin
      b = 8'($urandom);
      expect_q.push_back(b);
      send(b, (i % 2) ? 1552 : 1648);
      repeat (2000) @(posedge clk);
    end
    repeat (20000) @(posedge clk);
    checks++;
    if (got != 32) begin failures++; $display("FAIL received %0d bytes", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
