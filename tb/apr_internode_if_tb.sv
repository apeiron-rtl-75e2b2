// apr_internode_if_tb: two InterNode ports joined back to back (A transmits
// to B, B returns credits to A). Flits are sent on both VCs whenever A's
// credits allow; B's switch side pops at random. Checks per-VC order and
// content, that credits never run out in flight (buffer overflow would fire
// an assertion), that sending stalls when credits are used up, and that all
// credits come back at the end.
module apr_internode_if_tb;
  import apr_pkg::*;
  localparam int D = 6;
  localparam int SW = $clog2(D + 1);
  logic clk = 0, rst_n = 0;
  link_t a_tx, b_tx, a_rx, b_rx;
  logic [N_VC-1:0] a_rxc, a_txc, b_rxc, b_txc;
  logic [N_VC-1:0] a_in_valid, b_in_valid, a_pop, b_pop;
  flit_t [N_VC-1:0] a_in_flit, b_in_flit;
  logic a_ov, a_ovc, b_ov, b_ovc;
  flit_t a_of, b_of;
  logic [N_VC-1:0][SW-1:0] a_sp, b_sp;
  int checks = 0, failures = 0, stalls = 0;
  logic [FLIT_W-1:0] q[N_VC][$];

  apr_internode_if #(.VC_DEPTH(D)) ua (.clk, .rst_n, .rx(a_rx), .rx_credit(a_rxc), .tx(a_tx), .tx_credit(a_txc),
    .in_valid(a_in_valid), .in_flit(a_in_flit), .in_pop(a_pop), .out_valid(a_ov), .out_vc(a_ovc), .out_flit(a_of), .tx_space(a_sp));
  apr_internode_if #(.VC_DEPTH(D)) ub (.clk, .rst_n, .rx(b_rx), .rx_credit(b_rxc), .tx(b_tx), .tx_credit(b_txc),
    .in_valid(b_in_valid), .in_flit(b_in_flit), .in_pop(b_pop), .out_valid(b_ov), .out_vc(b_ovc), .out_flit(b_of), .tx_space(b_sp));
  assign b_rx  = a_tx;
  assign a_txc = b_rxc;
  assign a_rx  = '0;
  assign b_txc = '0;
  assign a_pop = '0;
  assign b_ov  = 0; assign b_ovc = 0; assign b_of = '0;
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver
  int got = 0;
  always @(negedge clk) begin
    b_pop = '0;
    if (rst_n) for (int v = 0; v < N_VC; v++)
      if (b_in_valid[v] && ($urandom % 3 == 0)) begin
        b_pop[v] = 1;
        checks++;
        got++;
        if (q[v].size() == 0 || b_in_flit[v].data != q[v][0] || b_in_flit[v].kind != FK_DATA) begin
          failures++; $display("VC%0d flit mismatch", v);
        end else void'(q[v].pop_front());
      end
  end

  initial begin
    int sent = 0;
    a_ov = 0; a_ovc = 0; a_of = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent < 3000) begin
      @(negedge clk);
      #1;
      a_ovc = 1'($urandom);
      a_ov  = (a_sp[a_ovc] != 0) && ($urandom % 4 != 0);
      if (a_sp[a_ovc] == 0) stalls++;
      a_of  = '{kind: FK_DATA, data: {$urandom, $urandom, $urandom, $urandom}};
      if (a_ov) begin q[a_ovc].push_back(a_of.data); sent++; end
      @(posedge clk);
      #1 a_ov = 0;
    end
    repeat (200) @(posedge clk);
    checks++;
    if (got != 3000) begin failures++; $display("received %0d of 3000", got); end
    checks++;
    if (a_sp[0] != SW'(D) || a_sp[1] != SW'(D)) begin failures++; $display("credits not restored"); end
    checks++;
    if (stalls == 0) begin failures++; $display("credit stall never happened"); end
    $display("credit stalls: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
