// Self-checking testbench for sample_sram at its default 4096 x 8 bits.
// Fills the whole memory with random data while reading back earlier
// addresses on the read port in the same cycles, then reads everything
// back in random order, comparing with a reference array. Checks the
// one-cycle read latency, that rdata holds without re, and last_wr.
module sample_sram_tb;
  localparam int D = 4096;
  logic clk = 0, rst = 1, we = 0, re = 0;
  logic [11:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata, last_wr;
  logic [7:0] model [D];
  int checks = 0, failures = 0;

  sample_sram dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int a = 0; a < D; a++) begin
      automatic logic [7:0] v = 8'($urandom);
      we <= 1; waddr <= 12'(a); wdata <= v;
      re <= (a > 0); raddr <= 12'(a > 0 ? a - 1 : 0);
      @(posedge clk);
      model[a] = v;
      #1;
      checks++;
      if (last_wr !== v) begin failures++; $display("last_wr %h want %h", last_wr, v); end
      if (a > 0) begin
        checks++;
        if (rdata !== model[a - 1]) begin failures++; $display("early read %0d: %h want %h", a - 1, rdata, model[a-1]); end
      end
    end
    we <= 0;
    for (int n = 0; n < 3000; n++) begin
      automatic int a = $urandom_range(0, D - 1);
      logic [7:0] held;
      re <= 1; raddr <= 12'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("read %0d: %h want %h", a, rdata, model[a]); end
      held = rdata;
      re <= 0; raddr <= 12'($urandom);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== held) begin failures++; $display("rdata changed without re"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
