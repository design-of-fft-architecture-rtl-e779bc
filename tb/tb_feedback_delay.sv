// tb_feedback_delay: drives a random stream with random enable gaps into a
// 16-deep delay line and checks that each output equals the word written 16
// enabled clocks earlier (zeros right after reset).
module tb_feedback_delay;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0;
  logic [10:0] d, q;
  logic [10:0] hist [$];

  feedback_delay #(.WIDTH(11), .LEN(16)) dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    for (int i = 0; i < 16; i++) hist.push_back('0);
    @(posedge clk); #1; rst = 0;
    for (int n = 0; n < 2000; n++) begin
      en = ($urandom_range(3, 0) != 0);
      d  = 11'($urandom);
      @(posedge clk); #1;
      if (en) begin
        hist.push_back(d);
        void'(hist.pop_front());
      end
      checks++;
      if (q !== hist[0]) begin
        failures++;
        $display("FAIL cycle %0d q=%h exp %h", n, q, hist[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
