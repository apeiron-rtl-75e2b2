// apr_rr_arbiter_tb: checks one-hot grants, that only requesters are
// granted, and round-robin order against a reference pointer model.
module apr_rr_arbiter_tb;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic advance;
  int checks = 0, failures = 0;
  int ptr = 0;

  apr_rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] model(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return N'(1) << ((p + k) % N);
    return '0;
  endfunction

  initial begin
    int served[N];
    req = 0; advance = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      req = (i < 1000) ? '1 : N'($urandom);
      advance = (i < 2000) ? 1'b1 : 1'($urandom);
      #1;
      checks++;
      if (gnt != model(req, ptr)) begin
        failures++;
        $display("cycle %0d req=%b gnt=%b expected %b", i, req, gnt, model(req, ptr));
      end
      @(posedge clk);
      if (advance && req != 0)
        for (int k = 0; k < N; k++) if (gnt[k]) begin ptr = (k + 1) % N; served[k]++; end
    end
    // all requesting continuously for the first 1000 cycles: equal shares
    for (int k = 0; k < N; k++) begin
      checks++;
      if (served[k] < 200) begin failures++; $display("requester %0d starved", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
