// apeiron_top_tb: end-to-end run of the particle-identification use case on
// a ring of four nodes (1-dimensional torus, coordinates 0-3), every
// parameter at its default.
//   node 0: apeiron_top, the preprocessing node. The test plays the
//                 sender and receiver kernels on IntraNode port 0; the
//                 Imagifier is on port 1.
//   nodes 1-3: apeiron_node, two CNN stand-ins each. Node 2 is two hops
//                 away; results from nodes 2 and 3 cross the wrap-around link
//                 (one image every 344 cycles, the 3.44 us per event of a
//                 single CNN at 100 MHz).
// Links run through link_model (4-cycle delay each way).
// Phases:
//  1. workload: events go sender -> Imagifier -> 1, 2, 3, 4 and 6 CNNs ->
//     receiver. Every result is checked against the test's own pixel
//     count, and the time per event is compared with 344/n cycles.
//  2. bulk: four 600-word messages to a task that stops reading, so the
//     traffic backs up through the buffers (VCT waits, credit stalls). Then
//     it resumes while 24 more events compete for the same links, and every
//     word, message boundary and result is checked.
//  2b. CNN results that find node 0's task port held by a long local
//     message (contention).
//  3. a packet for an absent task (dropped), and a packet for an absent
//     channel whose payload is corrupted on a link (footer error), both
//     checked in the registers.
//  4. latency of a one-word message, local loop and one hop.
// Every mechanism must occur at least once: local delivery, multi-hop
// dimension-order routes, VC1 after the wrap-around link, contention (a
// packet wanting an output that another packet holds or also wants), VCT waits, message splitting, drop, bad channel, footer check.
module apeiron_top_tb;
  import apr_pkg::*;
  localparam int NCH = 4, NT = 6, TW = $clog2(NT + 1), NL = 2;
  localparam int II = 344;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  task automatic check_true(string what, logic c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- links and registers of the four nodes ----------------
  link_t [NL-1:0]           tx[4], rx[4];
  logic  [NL-1:0][N_VC-1:0] rxc[4], txc[4];
  logic [7:0]  cfg_addr[4];
  logic        cfg_wr[4];
  logic [31:0] cfg_wdata[4], cfg_rdata[4];
  logic        corrupt = 0;
  int          ncorrupt[4][NL];

  for (genvar i = 0; i < 4; i++) begin : g_lnk
    for (genvar l = 0; l < NL; l++) begin : g_l
      // link 0 goes to the next node (+1), link 1 to the previous one (-1);
      // each arrives on the neighbour's opposite link
      localparam int J = (l == 0) ? (i + 1) % 4 : (i + 3) % 4;
      link_model #(.LAT(4)) u_lm (
        .clk, .corrupt,
        .a_tx(tx[i][l]), .b_rx(rx[J][l ^ 1]),
        .b_credit(rxc[J][l ^ 1]), .a_credit(txc[i][l]),
        .corrupted(ncorrupt[i][l]));
    end
  end

  // ---------------- node 0: apeiron_top ----------------
  logic  [TW-1:0]                 img_n_targets;
  dest_t [NT-1:0]                 img_target;
  logic  [0:0][NCH-1:0]           s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  logic  [0:0][NCH-1:0][FLIT_W-1:0] s_tdata, m_tdata;
  dest_t [0:0][NCH-1:0]           s_tuser, m_tuser;
  logic  [1:0]                    bad0;

  apeiron_top n0 (
    .clk, .rst_n,
    .cfg_addr(cfg_addr[0]), .cfg_wr(cfg_wr[0]), .cfg_wdata(cfg_wdata[0]), .cfg_rdata(cfg_rdata[0]),
    .img_n_targets, .img_target,
    .s_tvalid, .s_tready, .s_tdata, .s_tlast, .s_tuser,
    .m_tvalid, .m_tready, .m_tdata, .m_tlast, .m_tuser,
    .bad_ch(bad0),
    .rx(rx[0]), .rx_credit(rxc[0]), .tx(tx[0]), .tx_credit(txc[0]));

  // ---------------- nodes 1..3: apeiron_node with CNN stand-ins ----------------
  logic hold = 0;
  int images[4][2], bulk_words[4][2], bulk_msgs[4][2], bulk_err[4][2];
  logic [1:0] badn[4];
  for (genvar k = 1; k < 4; k++) begin : g_node
    logic  [1:0][NCH-1:0]             ns_tvalid, ns_tready, ns_tlast, nm_tvalid, nm_tready, nm_tlast;
    logic  [1:0][NCH-1:0][FLIT_W-1:0] ns_tdata, nm_tdata;
    dest_t [1:0][NCH-1:0]             ns_tuser, nm_tuser;
    apeiron_node u_n (
      .clk, .rst_n,
      .cfg_addr(cfg_addr[k]), .cfg_wr(cfg_wr[k]), .cfg_wdata(cfg_wdata[k]), .cfg_rdata(cfg_rdata[k]),
      .s_tvalid(ns_tvalid), .s_tready(ns_tready), .s_tdata(ns_tdata), .s_tlast(ns_tlast), .s_tuser(ns_tuser),
      .m_tvalid(nm_tvalid), .m_tready(nm_tready), .m_tdata(nm_tdata), .m_tlast(nm_tlast), .m_tuser(nm_tuser),
      .bad_ch(badn[k]),
      .rx(rx[k]), .rx_credit(rxc[k]), .tx(tx[k]), .tx_credit(txc[k]));
    for (genvar t = 0; t < 2; t++) begin : g_cnn
      cnn_model #(.NCH(NCH), .II(II)) u_cnn (
        .clk, .rst_n, .hold(hold && k == 3 && t == 1),
        .m_tvalid(nm_tvalid[t]), .m_tready(nm_tready[t]), .m_tdata(nm_tdata[t]), .m_tlast(nm_tlast[t]), .m_tuser(nm_tuser[t]),
        .s_tvalid(ns_tvalid[t]), .s_tready(ns_tready[t]), .s_tdata(ns_tdata[t]), .s_tlast(ns_tlast[t]), .s_tuser(ns_tuser[t]),
        .images(images[k][t]), .bulk_words(bulk_words[k][t]), .bulk_msgs(bulk_msgs[k][t]), .bulk_errors(bulk_err[k][t]));
    end
  end

  // ---------------- mechanism counters ----------------
  int n_contention = 0, n_vct_wait = 0, n_vc1 = 0, n_bad = 0, n_multihop = 0, n_split = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) for (int l = 0; l < NL; l++)
      if (tx[i][l].valid && tx[i][l].vc) n_vc1++;
    if (n0.u_node.g_task[0].u_agg.ohdr_wr && !n0.u_node.g_task[0].u_agg.ohdr_data.eom) n_split++;
    for (int i = 0; i < 2; i++) n_bad += bad0[i];
    for (int k = 1; k < 4; k++) for (int i = 0; i < 2; i++) n_bad += badn[k][i];
  end
  `define APR_SW_COUNT(SW) \
    always @(posedge clk) if (rst_n) begin \
      for (int o = 0; o < $size(SW.req); o++) begin \
        int n; n = int'(SW.owned[o]); \
        for (int r = 0; r < $size(SW.want); r++) n += int'(SW.want[r] && int'(SW.rport[r]) == o); \
        if (n > 1) n_contention++; \
      end \
      for (int r = 0; r < $size(SW.want); r++) if (SW.enable && SW.head[r] && !SW.rdrop[r] && !SW.want[r]) n_vct_wait++; \
    end
  `APR_SW_COUNT(n0.u_node.u_rip.u_switch)
  `APR_SW_COUNT(g_node[1].u_n.u_rip.u_switch)
  `APR_SW_COUNT(g_node[2].u_n.u_rip.u_switch)
  `APR_SW_COUNT(g_node[3].u_n.u_rip.u_switch)

  // ---------------- receiver (node 0, task 0, input channel 1) ----------------
  int exp_pop[int];
  int n_results = 0;
  longint t_last_result;
  always_comb begin
    m_tready    = '1;
    m_tready[0][1] = 1'b1;
  end
  always @(posedge clk) if (rst_n && m_tvalid[0][1]) begin
    int pc; pc = int'(m_tdata[0][1][31:0]);
    checks++;
    if (!exp_pop.exists(pc) || exp_pop[pc] == 0) begin failures++; $display("FAIL unexpected result %0d", pc); end
    else exp_pop[pc]--;
    if (!m_tlast[0][1]) begin failures++; $display("FAIL result without TLAST"); end
    if (m_tuser[0][1].coord == coord_t'(12'h002)) n_multihop++;
    n_results++;
    t_last_result = cyc;
  end

  // ---------------- sender (node 0, task 0, output channels) ----------------
  task automatic send_word(int ch, logic [FLIT_W-1:0] d, logic last, dest_t dst);
    @(negedge clk);
    s_tvalid[0][ch] = 1; s_tdata[0][ch] = d; s_tlast[0][ch] = last; s_tuser[0][ch] = dst;
    @(posedge clk); while (!s_tready[0][ch]) @(posedge clk);
    @(negedge clk) s_tvalid[0][ch] = 0;
  endtask

  function automatic dest_t dst(int node, int t, int ch);
    dest_t d; d = '0; d.coord[0] = COORD_W'(node); d.task_id = TASK_W'(t); d.ch = CH_W'(ch);
    return d;
  endfunction

  task automatic send_event();
    logic [255:0] img; int nw; img = '0; nw = 1 + $urandom % 3;
    for (int w = 0; w < nw; w++) begin
      logic [FLIT_W-1:0] d;
      for (int k = 0; k < 8; k++) begin
        logic [7:0] pmt; logic v; pmt = 8'($urandom); v = ($urandom % 3 != 0);
        d[16*k +: 16] = {v, 7'd0, pmt};
        if (v) img[pmt] = 1;
      end
      send_word(0, d, w == nw - 1, dst(0, 1, 0));
    end
    if (exp_pop.exists($countones(img))) exp_pop[$countones(img)]++;
    else exp_pop[$countones(img)] = 1;
  endtask

  task automatic cfg_write(int k, logic [7:0] a, logic [31:0] v);
    @(negedge clk); cfg_addr[k] = a; cfg_wr[k] = 1; cfg_wdata[k] = v;
    @(negedge clk); cfg_wr[k] = 0;
  endtask
  task automatic cfg_read(int k, logic [7:0] a, output logic [31:0] v);
    @(negedge clk); cfg_addr[k] = a; cfg_wr[k] = 0;
    @(posedge clk); #1 v = cfg_rdata[k];
  endtask

  // ---------------- test sequence ----------------
  real tpe[5];
  int lat_local, lat_hop;
  initial begin
    logic [31:0] v;
    int ncnn[5] = '{1, 2, 3, 4, 6};
    s_tvalid = '0; s_tdata = '0; s_tlast = '0; s_tuser = '0;
    for (int k = 0; k < 4; k++) begin cfg_addr[k] = 0; cfg_wr[k] = 0; cfg_wdata[k] = 0; end
    // CNN targets: task 0 of nodes 1,2,3 then task 1 of nodes 1,2,3
    img_target[0] = dst(1, 0, 0); img_target[1] = dst(2, 0, 0); img_target[2] = dst(3, 0, 0);
    img_target[3] = dst(1, 1, 0); img_target[4] = dst(2, 1, 0); img_target[5] = dst(3, 1, 0);
    img_n_targets = 1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) cfg_write(k, 8'h01, 32'(k));
    for (int k = 0; k < 4; k++) begin
      cfg_read(k, 8'h00, v); check("ID", v, IP_ID);
      cfg_read(k, 8'h01, v); check("COORD", v, k);
    end

    // 1. workload
    for (int p = 0; p < 5; p++) begin
      longint t0; int ev, r0;
      img_n_targets = TW'(ncnn[p]);
      ev = 12 * ncnn[p];
      r0 = n_results;
      repeat (5) @(negedge clk);
      t0 = cyc;
      for (int e = 0; e < ev; e++) send_event();
      wait (n_results == r0 + ev);
      tpe[p] = real'(t_last_result - t0) / ev;
      $display("%0d CNN(s): %0d events, %.1f cycles per event (%.3f us at 100 MHz), ideal %.1f",
               ncnn[p], ev, tpe[p], tpe[p] / 100.0, real'(II) / ncnn[p]);
      check_true($sformatf("time per event with %0d CNNs within 10%% of %0d/n", ncnn[p], II),
                 tpe[p] < 1.10 * real'(II) / ncnn[p] && tpe[p] > 0.9 * real'(II) / ncnn[p]);
      repeat (20) @(negedge clk);
    end
    foreach (exp_pop[k]) check("result count per pixel value", exp_pop[k], 0);
    for (int k = 1; k < 4; k++) for (int t = 0; t < 2; t++) check_true("every CNN used", images[k][t] > 0);

    // 2. bulk with back-pressure
    hold = 1;
    fork
      for (int m = 0; m < 4; m++)
        for (int i = 0; i < 600; i++) send_word(2, {32'hB0, 32'(m), 64'(i)}, i == 599, dst(3, 1, 3));
    join_none
    repeat (4000) @(negedge clk);
    check_true("bulk stalled while held", bulk_words[3][1] < 2400);
    hold = 0;
    // images compete with the draining bulk traffic for the same links
    begin
      int r0; r0 = n_results;
      for (int e = 0; e < 24; e++) send_event();
      wait (n_results == r0 + 24);
    end
    wait (bulk_msgs[3][1] == 4);
    foreach (exp_pop[k]) check("result count per pixel value after bulk", exp_pop[k], 0);
    check("bulk words", bulk_words[3][1], 2400);
    check("bulk word errors", bulk_err[3][1], 0);

    // 2b. contention at node 0's task port 0: six events go out, then a
    //     150-word message from task 0 to itself takes the port's output
    //     for about 150 cycles, just when the six CNN results come back
    //     (about 344 cycles after their images) and want the same output.
    begin
      int r0, c0; r0 = n_results; c0 = n_contention;
      for (int e = 0; e < 6; e++) send_event();
      for (int i = 0; i < 150; i++) send_word(2, {32'hC0, 32'd0, 64'(i)}, i == 149, dst(0, 0, 2));
      wait (n_results == r0 + 6);
      repeat (300) @(negedge clk);
      check_true("results wait while a long packet holds the task port", n_contention > c0);
    end
    foreach (exp_pop[k]) check("result count per pixel value after contention", exp_pop[k], 0);

    // 3. drop and footer error
    corrupt = 1;
    for (int i = 0; i < 3; i++) send_word(3, {32'h0, 32'h0, 64'(i)}, i == 2, dst(1, 3, 0));           // no task 3
    for (int i = 0; i < 3; i++) send_word(3, {32'hBAD0_0BAD, 32'h0, 64'(i)}, i == 2, dst(3, 0, 100)); // no channel 100
    repeat (100) @(negedge clk);
    cfg_read(1, 8'h04, v); check("node 1 DROPS", v, 1);
    cfg_read(3, 8'h03, v); check("node 3 footer ERRORS", v, 1);
    cfg_read(0, 8'h11, v); check_true("node 0 packets to the Imagifier port", v >= 12 * 13);

    // 4. latency of a one-word message: local loop (node 0 task 0 to itself)
    //    and one hop (to node 1), from the sender's word to the
    //    receiving channel's TVALID
    begin
      longint t0, t1, t2;
      fork
        send_word(2, {32'h1A7, 96'd1}, 1'b1, dst(0, 0, 2));
        begin @(posedge clk iff (s_tvalid[0][2] && s_tready[0][2])); t0 = cyc; end
        begin @(posedge clk iff m_tvalid[0][2]); t1 = cyc; end
      join
      lat_local = int'(t1 - t0);
      fork
        send_word(2, {32'h1A7, 96'd2}, 1'b1, dst(1, 0, 2));
        begin @(posedge clk iff (s_tvalid[0][2] && s_tready[0][2])); t0 = cyc; end
        begin @(posedge clk iff g_node[1].nm_tvalid[0][2]); t2 = cyc; end
      join
      lat_hop = int'(t2 - t0);
      $display("one-word message latency: local loop %0d cycles, one hop %0d cycles (link model %0d)", lat_local, lat_hop, 4);
      check_true("local loop latency under 25 cycles (250 ns at 100 MHz)", lat_local < 25);
      check_true("one-hop latency under 50 cycles (500 ns at 100 MHz)", lat_hop < 50);
    end

    // mechanisms
    $display("contention %0d, VCT waits %0d, VC1 flits %0d, split packets %0d, multi-hop results %0d, bad channel %0d",
             n_contention, n_vct_wait, n_vc1, n_split, n_multihop, n_bad);
    check_true("arbitration contention occurred", n_contention > 0);
    check_true("VCT wait occurred", n_vct_wait > 0);
    check_true("VC1 (dateline) used", n_vc1 > 0);
    check_true("message split into packets", n_split > 0);
    check_true("multi-hop route used", n_multihop > 0);
    check("bad channel drops", n_bad, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
