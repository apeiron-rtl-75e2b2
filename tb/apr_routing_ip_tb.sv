// apr_routing_ip_tb: one Routing IP on a 2x2 torus, node coordinate (1,0)
// set through the registers. The test acts as the Aggregators/Dispatchers
// on the IntraNode ports and as the neighbours on the links (returning a
// credit for each flit). Checks: register ID/COORD, local delivery between
// IntraNode ports, packets leaving on the link and VC given by DOR, packets
// arriving on links being delivered or forwarded, credit returns, the
// packet counters and the drop counter.
module apr_routing_ip_tb;
  import apr_pkg::*;
  localparam int ND = 2, DS = 2, NI = 2, NL = 4;
  logic clk = 0, rst_n = 0;
  logic [7:0] cfg_addr; logic cfg_wr; logic [31:0] cfg_wdata, cfg_rdata;
  coord_t my_coord;
  logic [NI-1:0] ohdr_wr, ohdr_full, odat_wr, odat_full, ihdr_rd, ihdr_empty, idat_rd, idat_empty;
  header_t [NI-1:0] ohdr_data, ihdr_data;
  logic [NI-1:0][FLIT_W-1:0] odat_data, idat_data;
  link_t [NL-1:0] rx, tx;
  logic [NL-1:0][N_VC-1:0] rx_credit, tx_credit;
  int checks = 0, failures = 0;

  apr_routing_ip #(.N_DIMS(ND), .DIM_SIZE(DS), .N_INTRA(NI), .VC_DEPTH(MAX_LEN + 2), .DATA_DEPTH(MAX_LEN)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] v);
    @(negedge clk); cfg_addr = a; cfg_wr = 0;
    @(posedge clk); #1 v = cfg_rdata;
  endtask

  function automatic header_t mkh(int dx, int dy, int task_id, int len, int tag);
    header_t h; h = '0;
    h.dst_coord[0] = COORD_W'(dx); h.dst_coord[1] = COORD_W'(dy);
    h.dst_task = TASK_W'(task_id); h.len = LEN_W'(len); h.eom = 1; h.src_ch = CH_W'(tag);
    return h;
  endfunction

  // task side: write a packet into IntraNode port p
  task automatic put(int p, header_t h);
    for (int i = 0; i < int'(h.len); i++) begin
      @(negedge clk); odat_wr[p] = 1; odat_data[p] = {96'(h.src_ch), 32'(i)};
      @(negedge clk); odat_wr[p] = 0;
    end
    @(negedge clk); ohdr_wr[p] = 1; ohdr_data[p] = h;
    @(negedge clk); ohdr_wr[p] = 0;
  endtask

  // task side: read a packet from IntraNode port p and check it
  task automatic get(int p, header_t h);
    int n = 0;
    while (ihdr_empty[p] && n < 200) begin @(negedge clk); n++; end
    if (ihdr_empty[p]) begin
      failures++; checks++; $display("no packet delivered to port %0d", p);
      return;
    end
    check("header delivered", int'(ihdr_data[p] == h), 1);
    @(negedge clk); ihdr_rd[p] = 1;
    @(negedge clk); ihdr_rd[p] = 0;
    for (int i = 0; i < int'(h.len); i++) begin
      while (idat_empty[p]) @(negedge clk);
      check("payload", int'(idat_data[p] == {96'(h.src_ch), 32'(i)}), 1);
      idat_rd[p] = 1; @(negedge clk); idat_rd[p] = 0;
    end
  endtask

  // neighbour side: capture what leaves on each link, return credits
  flit_t txq[NL][$];
  logic txvc[NL][$];
  int rxcred[NL][N_VC];
  always @(posedge clk) begin
    tx_credit <= '0;
    if (rst_n) for (int l = 0; l < NL; l++) begin
      if (tx[l].valid) begin
        txq[l].push_back(tx[l].flit); txvc[l].push_back(tx[l].vc);
        tx_credit[l][tx[l].vc] <= 1'b1;
      end
      for (int v = 0; v < N_VC; v++) if (rx_credit[l][v]) rxcred[l][v]++;
    end
  end

  task automatic inject(int l, int vc, header_t h);
    footer_t f; logic [31:0] cs; f = '0; cs = '0;
    @(negedge clk); rx[l] = '{valid: 1, vc: 1'(vc), flit: '{kind: FK_HEAD, data: h}};
    for (int i = 0; i < int'(h.len); i++) begin
      logic [FLIT_W-1:0] w; w = {96'(h.src_ch), 32'(i)};
      cs ^= w[31:0] ^ w[63:32] ^ w[95:64] ^ w[127:96];
      @(negedge clk); rx[l] = '{valid: 1, vc: 1'(vc), flit: '{kind: FK_DATA, data: w}};
    end
    f.csum = cs; f.len = h.len;
    @(negedge clk); rx[l] = '{valid: 1, vc: 1'(vc), flit: '{kind: FK_FOOT, data: f}};
    @(negedge clk); rx[l] = '0;
  endtask

  task automatic expect_tx(int l, int vc, header_t h);
    int n = 0;
    while (txq[l].size() < int'(h.len) + 2 && n < 300) begin @(negedge clk); n++; end
    check("tx packet complete", int'(txq[l].size() >= int'(h.len) + 2), 1);
    if (txq[l].size() >= int'(h.len) + 2) begin
      check("tx header", int'(txq[l][0].kind == FK_HEAD && header_t'(txq[l][0].data) == h), 1);
      check("tx vc", int'(txvc[l][0]), vc);
      for (int i = 0; i < int'(h.len); i++)
        check("tx payload", int'(txq[l][1 + i].data == {96'(h.src_ch), 32'(i)}), 1);
      begin
        flit_t last; int k; k = int'(h.len) + 1; last = txq[l][k];
        check("tx footer", int'(last.kind == FK_FOOT), 1);
      end
      txq[l].delete(); txvc[l].delete();
    end
  endtask

  initial begin
    logic [31:0] v;
    header_t h;
    cfg_addr = 0; cfg_wr = 0; cfg_wdata = 0;
    ohdr_wr = 0; odat_wr = 0; ihdr_rd = 0; idat_rd = 0; ohdr_data = '0; odat_data = '0;
    rx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd(8'h00, v); check("ID", v, IP_ID);
    @(negedge clk); cfg_addr = 8'h01; cfg_wr = 1; cfg_wdata = 32'h001;   // x=1, y=0
    @(negedge clk); cfg_wr = 0;
    rd(8'h01, v); check("COORD", v, 1);
    // 1. local: port 0 -> task 1
    h = mkh(1, 0, 1, 5, 1); put(0, h); get(1, h);
    // 2. to (0,0): dimension 0, plus link (tie), wraps from x=1 -> VC1, link 0
    h = mkh(0, 0, 0, 7, 2); put(1, h); expect_tx(0, 1, h);
    // 3. to (0,1): dimension 1 first (antilexicographic), y 0->1 plus, no wrap: link 2, VC0
    h = mkh(0, 1, 1, 3, 3); put(0, h); expect_tx(2, 0, h);
    // 4. arriving on link 1 (minus of x, travelling plus) VC1, for this node task 0
    h = mkh(1, 0, 0, 4, 4); inject(1, 1, h); get(0, h);
    // 5. transit: arriving on link 3 (minus of y, travelling plus) VC1, for (1,1): continues on link 2
    //    keeping VC1 (it is travelling straight on), from y=0 no wrap
    h = mkh(1, 1, 0, 6, 5); inject(3, 1, h); expect_tx(2, 1, h);
    // 6. drop: local packet for task 3 (no such port)
    h = mkh(1, 0, 3, 2, 6); put(0, h);
    repeat (20) @(negedge clk);
    check("credits returned link1 vc1", rxcred[1][1], 4 + 2);
    check("credits returned link3 vc1", rxcred[3][1], 6 + 2);
    rd(8'h04, v); check("DROPS", v, 1);
    rd(8'h03, v); check("ERRORS", v, 0);
    rd(8'h10, v); check("PKTS port0", v, 1);
    rd(8'h11, v); check("PKTS port1", v, 1);
    rd(8'h12, v); check("PKTS link0", v, 1);
    rd(8'h14, v); check("PKTS link2", v, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
