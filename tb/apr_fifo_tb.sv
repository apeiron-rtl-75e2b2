// apr_fifo_tb: random pushes and pops against a queue model; checks the
// head word, the count, full and empty, with a non-power-of-two depth.
module apr_fifo_tb;
  localparam int W = 12, DEPTH = 5;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, empty, full;
  logic [W-1:0] wr_data, rd_data;
  logic [2:0] count, free;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  apr_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || count != 3'(q.size())
          || free != 3'(DEPTH - q.size())) begin
        failures++;
        $display("status mismatch at %0d: count=%0d model=%0d", i, count, q.size());
      end
      if (q.size() != 0) begin
        checks++;
        if (rd_data != q[0]) begin
          failures++;
          $display("data mismatch: %h vs %h", rd_data, q[0]);
        end
      end
      wr_en   = ($urandom % 3 != 0) && !full;
      rd_en   = ($urandom % 2 == 0) && !empty;
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
