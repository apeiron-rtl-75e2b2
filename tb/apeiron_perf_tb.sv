// apeiron_perf_tb: latency and bandwidth sweep between HLS-style tasks.
//
// Two apeiron_node instances at their default parameters (ring of four
// nodes, 2 tasks per node, 4 channels per task, full-size buffers) sit at
// coordinates 0 and 1, the two other ring nodes being absent. Their links
// are joined through link_model with a 4-cycle delay each way; traffic
// between them uses only node 0's plus link and node 1's minus link. Behavioural tasks on the channels play the part
// of the test kernels. Payload sizes run from 16 B to 4 kB (1 to 256 words
// of 128 bits):
//  - localloop latency: node A task 0 channel 0 sends one message to its
//    own channel 1. Time from the first word accepted to the last word
//    delivered.
//  - roundtrip latency: A sends one message to B task 0. B bounces it back
//    as soon as it has arrived whole ("pipe"). Half the time from the first
//    word sent to the last word returned.
//  - one-way bandwidth: A sends 256 kB in messages of the given size to B.
//    After the last word B answers with a one-word ACK. Bandwidth is bits
//    sent over the time from the first word to the ACK.
//  - loopback bandwidth: the same from A task 0 to A task 1, ACK included.
// Every delivered word is compared with the word sent, with TLAST on the
// last word of each message. The rate checks: the 4 kB bandwidths reach at
// least 12.0 Gbit/s and stay at or under the raw 12.8 Gbit/s (128 bits per
// cycle), bandwidth grows with message size, the 16 B localloop latency is
// under 25 cycles and the 16 B roundtrip half-latency under 100 cycles (the
// published system, kernels and transceivers included, gave about 250 ns
// and just under 1 us at 100 MHz).
module apeiron_perf_tb;
  import apr_pkg::*;
  localparam int NI = 2, NCH = 4, NL = 2;
  localparam int SIZES[5] = '{1, 4, 16, 64, 256};  // words of 16 B
  localparam int TOTAL = 16384;                    // words per bandwidth run (256 kB)
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  link_t [NL-1:0] tx[2], rx[2];
  logic [NL-1:0][N_VC-1:0] rxc[2], txc[2];
  logic [7:0] cfg_addr[2]; logic cfg_wr[2]; logic [31:0] cfg_wdata[2], cfg_rdata[2];
  logic  [NI-1:0][NCH-1:0]             s_tvalid[2], s_tready[2], s_tlast[2], m_tvalid[2], m_tready[2], m_tlast[2];
  logic  [NI-1:0][NCH-1:0][FLIT_W-1:0] s_tdata[2], m_tdata[2];
  dest_t [NI-1:0][NCH-1:0]             s_tuser[2], m_tuser[2];
  logic  [NI-1:0]                      bad[2];
  int corrupted[2][2];

  for (genvar i = 0; i < 2; i++) begin : g_n
    apeiron_node u_n (
      .clk, .rst_n,
      .cfg_addr(cfg_addr[i]), .cfg_wr(cfg_wr[i]), .cfg_wdata(cfg_wdata[i]), .cfg_rdata(cfg_rdata[i]),
      .s_tvalid(s_tvalid[i]), .s_tready(s_tready[i]), .s_tdata(s_tdata[i]), .s_tlast(s_tlast[i]), .s_tuser(s_tuser[i]),
      .m_tvalid(m_tvalid[i]), .m_tready(m_tready[i]), .m_tdata(m_tdata[i]), .m_tlast(m_tlast[i]), .m_tuser(m_tuser[i]),
      .bad_ch(bad[i]),
      .rx(rx[i]), .rx_credit(rxc[i]), .tx(tx[i]), .tx_credit(txc[i]));
    // link 0 (plus) of one node goes to link 1 (minus) of the other
    for (genvar l = 0; l < 2; l++) begin : g_l
      link_model #(.LAT(4)) u_lm (
        .clk, .corrupt(1'b0),
        .a_tx(tx[i][l]), .b_rx(rx[1 - i][l ^ 1]),
        .b_credit(rxc[1 - i][l ^ 1]), .a_credit(txc[i][l]),
        .corrupted(corrupted[i][l]));
    end
  end

  // ---- task models: one streaming sender per (node, task, channel) ----
  typedef struct { logic [FLIT_W-1:0] w; logic last; dest_t d; } sw_t;
  sw_t sq[2][NI][NCH][$];
  typedef struct { logic [FLIT_W-1:0] w; logic last; } ew_t;
  ew_t eq[2][NI][NCH][$];
  int first_tx = -1, got[2][NI][NCH], last_rx[2][NI][NCH];
  logic pipe = 0;   // node B task 0 channel 0 bounces each message to A

  always @(negedge clk) begin
    for (int i = 0; i < 2; i++) for (int t = 0; t < NI; t++) for (int c = 0; c < NCH; c++) begin
      s_tvalid[i][t][c] = rst_n && sq[i][t][c].size() != 0;
      if (sq[i][t][c].size() != 0) begin
        s_tdata[i][t][c] = sq[i][t][c][0].w; s_tlast[i][t][c] = sq[i][t][c][0].last; s_tuser[i][t][c] = sq[i][t][c][0].d;
      end else begin
        s_tdata[i][t][c] = '0; s_tlast[i][t][c] = 0; s_tuser[i][t][c] = '0;
      end
      m_tready[i][t][c] = 1;
    end
  end

  ew_t bounce[$];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++) for (int t = 0; t < NI; t++) for (int c = 0; c < NCH; c++) begin
      if (s_tvalid[i][t][c] && s_tready[i][t][c]) begin
        if (first_tx < 0) first_tx = cyc;
        void'(sq[i][t][c].pop_front());
      end
      if (m_tvalid[i][t][c] && m_tready[i][t][c]) begin
        checks++;
        if (eq[i][t][c].size() == 0 || eq[i][t][c][0].w != m_tdata[i][t][c] || eq[i][t][c][0].last != m_tlast[i][t][c]) begin
          failures++;
          if (failures < 10) $display("data mismatch at node %0d task %0d ch %0d", i, t, c);
        end
        if (eq[i][t][c].size() != 0) void'(eq[i][t][c].pop_front());
        got[i][t][c]++; last_rx[i][t][c] = cyc;
        if (pipe && i == 1 && t == 0 && c == 0) begin
          bounce.push_back('{w: m_tdata[i][t][c], last: m_tlast[i][t][c]});
          if (m_tlast[i][t][c]) begin
            dest_t d; d = '0;
            foreach (bounce[k]) begin
              sq[1][0][0].push_back('{w: bounce[k].w, last: bounce[k].last, d: d});
              eq[0][0][0].push_back('{w: bounce[k].w, last: bounce[k].last});
            end
            bounce.delete();
          end
        end
      end
    end
  end

  task automatic send(int si, int st, int sc, int di, int dt, int dc, int len, int tag);
    dest_t d; d = '0; d.coord[0] = COORD_W'(di); d.task_id = TASK_W'(dt); d.ch = CH_W'(dc);
    for (int k = 0; k < len; k++) begin
      logic [FLIT_W-1:0] w; w = {32'(tag), 32'(k), 32'($urandom), 32'($urandom)};
      sq[si][st][sc].push_back('{w: w, last: k == len - 1, d: d});
      eq[di][dt][dc].push_back('{w: w, last: k == len - 1});
    end
  endtask

  task automatic wait_rx(int i, int t, int c, int n);
    while (got[i][t][c] < n) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic clear();
    for (int i = 0; i < 2; i++) for (int t = 0; t < NI; t++) for (int c = 0; c < NCH; c++) got[i][t][c] = 0;
    first_tx = -1;
  endtask

  real lat_loc[5], lat_rt[5], bw_one[5], bw_loop[5];

  initial begin
    for (int i = 0; i < 2; i++) begin cfg_addr[i] = 0; cfg_wr[i] = 0; cfg_wdata[i] = 0; end
    for (int i = 0; i < 2; i++) for (int t = 0; t < NI; t++) for (int c = 0; c < NCH; c++) begin
      got[i][t][c] = 0; last_rx[i][t][c] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cfg_addr[1] = 8'h01; cfg_wr[1] = 1; cfg_wdata[1] = 32'd1;   // node B at 1
    @(negedge clk); cfg_wr[1] = 0;
    repeat (20) @(posedge clk);

    for (int s = 0; s < 5; s++) begin
      int n;
      n = SIZES[s];
      // localloop latency: A task 0 ch 0 -> A task 0 ch 1
      clear(); repeat (5) @(posedge clk);
      send(0, 0, 0, 0, 0, 1, n, 100 + s);
      wait_rx(0, 0, 1, n);
      lat_loc[s] = real'(last_rx[0][0][1] - first_tx + 1);
      // roundtrip latency: A -> B task 0 ch 0 -> back to A task 0 ch 0
      clear(); pipe = 1; repeat (5) @(posedge clk);
      send(0, 0, 0, 1, 0, 0, n, 200 + s);
      wait_rx(0, 0, 0, n);
      lat_rt[s] = real'(last_rx[0][0][0] - first_tx + 1) / 2.0;
      pipe = 0;
      // one-way bandwidth: A task 0 -> B task 0 ch 1, then ACK B -> A ch 2
      clear(); repeat (5) @(posedge clk);
      for (int m = 0; m < TOTAL / n; m++) send(0, 0, 0, 1, 0, 1, n, 300 + s);
      wait_rx(1, 0, 1, TOTAL);
      send(1, 0, 1, 0, 0, 2, 1, 400 + s);
      wait_rx(0, 0, 2, 1);
      bw_one[s] = 12.8 * TOTAL / real'(last_rx[0][0][2] - first_tx + 1);
      // loopback bandwidth: A task 0 -> A task 1 ch 1, ACK back to task 0 ch 2
      clear(); repeat (5) @(posedge clk);
      for (int m = 0; m < TOTAL / n; m++) send(0, 0, 0, 0, 1, 1, n, 500 + s);
      wait_rx(0, 1, 1, TOTAL);
      send(0, 1, 1, 0, 0, 2, 1, 600 + s);
      wait_rx(0, 0, 2, 1);
      bw_loop[s] = 12.8 * TOTAL / real'(last_rx[0][0][2] - first_tx + 1);
      $display("%5d B: localloop %5.1f cycles, roundtrip/2 %6.1f cycles, one-way %5.2f Gbit/s, loopback %5.2f Gbit/s",
               16 * n, lat_loc[s], lat_rt[s], bw_one[s], bw_loop[s]);
    end

    checks++; if (lat_loc[0] >= 25.0) begin failures++; $display("16 B localloop latency too long"); end
    checks++; if (lat_rt[0] >= 100.0) begin failures++; $display("16 B roundtrip latency too long"); end
    checks++; if (bw_one[4] < 12.0 || bw_one[4] > 12.8) begin failures++; $display("4 kB one-way bandwidth out of range"); end
    checks++; if (bw_loop[4] < 12.0 || bw_loop[4] > 12.8) begin failures++; $display("4 kB loopback bandwidth out of range"); end
    for (int s = 1; s < 5; s++) begin
      checks++; if (bw_one[s] < bw_one[s-1]) begin failures++; $display("one-way bandwidth drops at size %0d", s); end
      checks++; if (bw_loop[s] < bw_loop[s-1]) begin failures++; $display("loopback bandwidth drops at size %0d", s); end
    end
    for (int i = 0; i < 2; i++) for (int t = 0; t < NI; t++) for (int c = 0; c < NCH; c++) begin
      checks++; if (eq[i][t][c].size() != 0) begin failures++; $display("words missing at node %0d task %0d ch %0d", i, t, c); end
    end
    checks++; if (bad[0] != 0 || bad[1] != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
