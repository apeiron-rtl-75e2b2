// apeiron_node_tb: two apeiron_node instances on a 2-node ring (N_DIMS=1,
// DIM_SIZE=2), links joined directly. Every task (2 per node) sends random
// messages (1 to 300 words) on random output channels to random tasks and
// channels on either node. Every input channel is read with random ready.
// A scoreboard per (node, task, channel) checks that each message arrives
// whole, in order per sender channel, with TLAST on its last word and the
// sender in TUSER.
module apeiron_node_tb;
  import apr_pkg::*;
  localparam int NI = 2, NCH = 3, NL = 2, NMSG = 25;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
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

  // node 0 plus link (0) -> node 1 minus link (1), and the reverse
  for (genvar i = 0; i < 2; i++) begin : g_n
    apeiron_node #(.N_DIMS(1), .DIM_SIZE(2), .N_INTRA(NI), .N_CH(NCH), .VC_DEPTH(MAX_LEN + 2), .DATA_DEPTH(MAX_LEN)) u_n (
      .clk, .rst_n,
      .cfg_addr(cfg_addr[i]), .cfg_wr(cfg_wr[i]), .cfg_wdata(cfg_wdata[i]), .cfg_rdata(cfg_rdata[i]),
      .s_tvalid(s_tvalid[i]), .s_tready(s_tready[i]), .s_tdata(s_tdata[i]), .s_tlast(s_tlast[i]), .s_tuser(s_tuser[i]),
      .m_tvalid(m_tvalid[i]), .m_tready(m_tready[i]), .m_tdata(m_tdata[i]), .m_tlast(m_tlast[i]), .m_tuser(m_tuser[i]),
      .bad_ch(bad[i]),
      .rx(rx[i]), .rx_credit(rxc[i]), .tx(tx[i]), .tx_credit(txc[i]));
    for (genvar l = 0; l < NL; l++) begin : g_l
      assign rx[1 - i][l ^ 1]  = tx[i][l];
      assign txc[i][l]         = rxc[1 - i][l ^ 1];
    end
  end

  // expected words per receiving (node, task, channel), keyed by sender
  typedef struct { logic [FLIT_W-1:0] w; logic last; } ew_t;
  ew_t exp_q[2][NI][NCH][int][$];
  int expected = 0, received = 0;

  for (genvar i = 0; i < 2; i++) begin : g_rx
    for (genvar t = 0; t < NI; t++) begin : g_t
      for (genvar c = 0; c < NCH; c++) begin : g_c
        always @(negedge clk) m_tready[i][t][c] = ($urandom % 4 != 0);
        always @(posedge clk) if (rst_n && m_tvalid[i][t][c] && m_tready[i][t][c]) begin
          int key; dest_t s; s = m_tuser[i][t][c];
          key = int'(s.coord[0]) * 100 + int'(s.task_id) * 10 + int'(s.ch);
          checks++; received++;
          if (!exp_q[i][t][c].exists(key) || exp_q[i][t][c][key].size() == 0 ||
              exp_q[i][t][c][key][0].w != m_tdata[i][t][c] || exp_q[i][t][c][key][0].last != m_tlast[i][t][c]) begin
            failures++;
            if (failures < 10) $display("mismatch at node %0d task %0d ch %0d from %0d", i, t, c, key);
          end else void'(exp_q[i][t][c][key].pop_front());
        end
      end
    end
  end

  // senders
  for (genvar i = 0; i < 2; i++) begin : g_tx
    for (genvar t = 0; t < NI; t++) begin : g_t
      for (genvar c = 0; c < NCH; c++) begin : g_c
        initial begin
          s_tvalid[i][t][c] = 0; s_tdata[i][t][c] = '0; s_tlast[i][t][c] = 0; s_tuser[i][t][c] = '0;
          wait (rst_n);
          repeat (20) @(posedge clk);
          for (int m = 0; m < NMSG; m++) begin
            dest_t d; int len, dn, key;
            d = '0; dn = $urandom % 2; d.coord[0] = COORD_W'(dn); d.task_id = TASK_W'($urandom % NI); d.ch = CH_W'($urandom % NCH);
            len = ($urandom % 6 == 0) ? 257 + $urandom % 40 : 1 + $urandom % 30;
            key = i * 100 + t * 10 + c;
            for (int k = 0; k < len; k++) begin
              logic [FLIT_W-1:0] w; w = {32'(key), 32'(m), 32'(k), 32'($urandom)};
              exp_q[dn][d.task_id][d.ch][key].push_back('{w: w, last: k == len - 1});
              expected++;
              @(negedge clk);
              s_tvalid[i][t][c] = 1; s_tdata[i][t][c] = w; s_tlast[i][t][c] = (k == len - 1); s_tuser[i][t][c] = d;
              @(posedge clk); while (!s_tready[i][t][c]) @(posedge clk);
              @(negedge clk) s_tvalid[i][t][c] = 0;
            end
          end
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < 2; i++) begin cfg_addr[i] = 0; cfg_wr[i] = 0; cfg_wdata[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cfg_addr[1] = 8'h01; cfg_wr[1] = 1; cfg_wdata[1] = 32'd1;
    @(negedge clk); cfg_wr[1] = 0;
    repeat (100) @(posedge clk);
    wait (received == expected && expected > 0);
    repeat (200) @(posedge clk);
    checks++;
    if (received != expected) begin failures++; $display("received %0d expected %0d", received, expected); end
    checks++;
    if (bad[0] != 0 || bad[1] != 0) failures++;
    $display("words delivered: %0d", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
