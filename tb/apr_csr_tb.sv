// apr_csr_tb: register read/write, reset values and event counters.
module apr_csr_tb;
  import apr_pkg::*;
  localparam int NP = 6, NI = 2;
  logic clk = 0, rst_n = 0;
  logic [7:0] cfg_addr;
  logic cfg_wr, enable, drop;
  logic [31:0] cfg_wdata, cfg_rdata;
  coord_t my_coord;
  logic [NP-1:0] out_pkt;
  logic [NI-1:0] csum_err;
  int checks = 0, failures = 0;
  int npk[NP], nerr, ndrop;

  apr_csr #(.N_PORTS(NP), .N_INTRA(NI)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] v);
    @(negedge clk); cfg_addr = a; cfg_wr = 0;
    @(posedge clk); #1 v = cfg_rdata;
  endtask

  initial begin
    logic [31:0] v;
    cfg_addr = 0; cfg_wr = 0; cfg_wdata = 0; out_pkt = 0; csum_err = 0; drop = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd(8'h00, v); check("ID", v, IP_ID);
    rd(8'h01, v); check("COORD reset", v, 0);
    rd(8'h02, v); check("CTRL reset", v, 1);
    check("enable reset", 32'(enable), 1);
    @(negedge clk); cfg_addr = 8'h01; cfg_wr = 1; cfg_wdata = 32'h0000_0321;
    @(negedge clk); cfg_addr = 8'h02; cfg_wdata = 0;
    @(negedge clk); cfg_wr = 0;
    check("my_coord", 32'(my_coord), 32'h321);
    check("enable off", 32'(enable), 0);
    rd(8'h01, v); check("COORD", v, 32'h321);
    // random events
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      out_pkt = NP'($urandom); csum_err = NI'($urandom % 7 == 0 ? $urandom : 0); drop = ($urandom % 5 == 0);
      for (int p = 0; p < NP; p++) npk[p] += out_pkt[p];
      nerr += $countones(csum_err); ndrop += drop;
    end
    @(negedge clk); out_pkt = 0; csum_err = 0; drop = 0;
    rd(8'h03, v); check("ERRORS", v, nerr);
    rd(8'h04, v); check("DROPS", v, ndrop);
    for (int p = 0; p < NP; p++) begin rd(8'(8'h10 + p), v); check("PKTS", v, npk[p]); end
    rd(8'h7f, v); check("unmapped", v, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
