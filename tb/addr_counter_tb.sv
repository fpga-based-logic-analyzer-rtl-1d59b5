// Self-checking testbench for addr_counter at DEPTH = 16 and at the
// default 4096. Random clear and inc; address and last are compared with a
// reference count modulo DEPTH. The default-size instance is walked once
// through all 4096 addresses to see it wrap.
module addr_counter_tb;
  localparam int D = 16;
  logic clk = 0, rst = 1, clear = 0, inc = 0;
  logic [3:0] addr;
  logic last;
  logic clear_b = 0, inc_b = 0;
  logic [11:0] addr_b;
  logic last_b;
  int checks = 0, failures = 0, ref_a = 0;

  addr_counter #(.DEPTH(D)) dut (.*);
  addr_counter big (.clk, .rst, .clear(clear_b), .inc(inc_b), .addr(addr_b), .last(last_b));

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      automatic logic c = ($urandom_range(0, 15) == 0);
      automatic logic i = 1'($urandom);
      clear <= c; inc <= i;
      @(posedge clk);
      if (c) ref_a = 0;
      else if (i) ref_a = (ref_a + 1) % D;
      #1;
      checks++;
      if (addr != 4'(ref_a) || last != (ref_a == D - 1)) begin
        failures++; $display("addr %0d last %b want %0d", addr, last, ref_a);
      end
    end
    clear <= 0; inc <= 0;
    checks++;
    if (addr_b != 0) begin failures++; $display("big reset addr %0d", addr_b); end
    inc_b <= 1;
    for (int n = 1; n <= 4096; n++) begin
      @(posedge clk);
      #1;
      checks++;
      if (addr_b != 12'(n % 4096) || last_b != (n == 4095)) begin
        failures++; $display("big addr %0d want %0d", addr_b, n % 4096);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
