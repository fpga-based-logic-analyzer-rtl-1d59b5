// Self-checking testbench for data_buffer.
// Random data and load enables; q must follow a reference register that
// loads d on every clock edge with load high and holds otherwise.
module data_buffer_tb;
  logic clk = 0, rst = 1, load = 0;
  logic [7:0] d = 0, q, ref_q = 0;
  int checks = 0, failures = 0;

  data_buffer #(.W(8)) dut (.*);

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
    @(posedge clk);
    #1;
    checks++;
    if (q !== 8'h00) begin failures++; $display("reset value %h", q); end
    for (int n = 0; n < 1000; n++) begin
      automatic logic l = 1'($urandom);
      automatic logic [7:0] v = 8'($urandom);
      load <= l; d <= v;
      @(posedge clk);
      if (l) ref_q = v;
      #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("q %h want %h", q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
