// tb_delay_line: checks that the delay line returns every input exactly
// DEPTH clocks later and that it reads zero after reset.
module tb_delay_line;
  localparam int W = 12;
  localparam int DEPTH = 5;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  delay_line #(.W(W), .DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) hist.push_back('0);
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      checks++;
      if (q !== hist[0]) failures++;
      void'(hist.pop_front());
      d = W'($urandom);
      hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
