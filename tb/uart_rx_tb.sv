// Self-checking testbench for uart_rx.
// Sends random bytes as 8N1 frames at CLKS_PER_BIT = 8, with random idle
// gaps, and checks each received byte and that rx_dv pulses once per frame,
// within 10 bit times of the frame's start. A frame with a low stop bit must
// produce no byte, and a short low glitch must not start a frame.
module uart_rx_tb;
  localparam int CPB = 8;
  logic clk = 0, rst = 1, rx_serial = 1;
  logic [7:0] rx_byte;
  logic rx_dv;
  int checks = 0, failures = 0, dv_count = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rx_dv) dv_count++;

  task automatic send(input logic [7:0] b, input logic stop_bit);
    automatic logic [9:0] f = {stop_bit, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx_serial <= f[i];
      repeat (CPB) @(posedge clk);
    end
    rx_serial <= 1'b1;
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      automatic int n_before = dv_count;
      automatic int waited = 0;
      fork
        send(b, 1'b1);
        begin
          while (!rx_dv) begin @(posedge clk); waited++; end
        end
      join
      @(posedge clk);
      checks++;
      if (rx_byte !== b || dv_count != n_before + 1 || waited > 10 * CPB + 4) begin
        failures++;
        $display("byte %0d: got %h want %h dv %0d waited %0d", n, rx_byte, b, dv_count - n_before, waited);
      end
      repeat ($urandom_range(0, 3 * CPB)) @(posedge clk);
    end
    // Framing error: no byte.
    begin
      automatic int n_before = dv_count;
      send(8'hA5, 1'b0);
      repeat (3 * CPB) @(posedge clk);
      rx_serial <= 1'b1;
      repeat (12 * CPB) @(posedge clk);
      checks++;
      if (dv_count != n_before) begin failures++; $display("framing error accepted"); end
    end
    // Glitch shorter than half a bit: no byte.
    begin
      automatic int n_before = dv_count;
      rx_serial <= 1'b0;
      repeat (2) @(posedge clk);
      rx_serial <= 1'b1;
      repeat (12 * CPB) @(posedge clk);
      checks++;
      if (dv_count != n_before) begin failures++; $display("glitch accepted"); end
    end
    // Receiver still works.
    send(8'h3C, 1'b1);
    repeat (CPB) @(posedge clk);
    checks++;
    if (rx_byte !== 8'h3C) begin failures++; $display("after errors got %h", rx_byte); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
