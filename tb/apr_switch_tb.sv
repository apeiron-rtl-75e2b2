// apr_switch_tb: the switch of a node at coordinate 3 on a 4-node ring
// (N_DIMS=1), with 2 IntraNode ports and 2 links of 2 VCs (6 inputs, 4
// outputs). Each input plays random packets. Output space is modelled per
// port and VC, consumed by each flit and refilled at random. Checks:
//  - every packet leaves whole, uninterrupted, on the port and VC given by
//    an independent routing model, and packets for absent tasks are dropped;
//  - Virtual Cut-Through: a header leaves only with room for the packet;
//  - contention and VCT waits both occur;
//  - rate: a 256-word packet from an idle input crosses at one flit per
//    cycle (header to footer in 257 cycles, 128 bits at 100 MHz = 12.8
//    Gbit/s), with the header leaving 1 cycle after it is offered.
module apr_switch_tb;
  import apr_pkg::*;
  localparam int ND = 1, DS = 4, NI = 2, NL = 2, NP = 4, NR = 6, SPW = 11;
  localparam int MY = 3;
  localparam int NPK = 60;          // packets per input
  logic clk = 0, rst_n = 0, enable = 1, drop;
  coord_t my_coord;
  logic [NR-1:0] in_valid, in_pop;
  flit_t [NR-1:0] in_flit;
  logic [NP-1:0] out_valid, out_vc, out_pkt;
  flit_t [NP-1:0] out_flit;
  logic [NP-1:0][N_VC-1:0][SPW-1:0] out_space;
  int checks = 0, failures = 0;

  apr_switch #(.N_DIMS(ND), .DIM_SIZE(DS), .N_INTRA(NI), .SPACE_W(SPW)) dut (.*);
  always #5 clk = ~clk;
  assign my_coord = coord_t'(MY);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  flit_t src[NR][$];
  int exp_port[int], exp_vc[int], exp_len[int];
  int ndrop_exp = 0, ndrop = 0, delivered = 0, total = 0;
  logic gap[NR];
  logic burst = 0;

  // independent routing model, one dimension
  task automatic route(int r, int dst, int task_id, output int port, output int vc, output int dr);
    int fwd; logic minus, straight;
    dr = 0; vc = 0;
    if (dst == MY) begin port = task_id; dr = int'(task_id >= NI); end
    else begin
      fwd = (dst - MY + DS) % DS;
      minus = (DS - fwd < fwd);
      port = NI + minus;
      straight = (r >= NI) && ((r - NI) / 2 == 1 - minus);
      vc = straight ? (r - NI) % 2 : 0;
      if (!minus && MY == DS - 1) vc = 1;
      if (minus && MY == 0) vc = 1;
    end
  endtask

  task automatic make_packet(int r, int id, int len, int dst, int task_id);
    header_t h; footer_t f; int p, v, d;
    h = '0; h.len = LEN_W'(len); h.dst_coord = coord_t'(dst); h.dst_task = TASK_W'(task_id);
    h.rsvd = '0; h.rsvd[15:0] = 16'(id);
    src[r].push_back('{kind: FK_HEAD, data: h});
    for (int i = 0; i < len; i++) src[r].push_back('{kind: FK_DATA, data: {16'(id), 16'(i), 96'($urandom)}});
    f = '0;
    src[r].push_back('{kind: FK_FOOT, data: f});
    route(r, dst, task_id, p, v, d);
    if (d != 0) ndrop_exp++;
    else begin exp_port[id] = p; exp_vc[id] = v; exp_len[id] = len; total++; end
  endtask

  // sources
  always_comb
    for (int r = 0; r < NR; r++) begin
      in_valid[r] = (src[r].size() != 0) && !gap[r];
      in_flit[r]  = (src[r].size() != 0) ? src[r][0] : '0;
    end
  always @(posedge clk) if (rst_n)
    for (int r = 0; r < NR; r++) begin
      if (in_pop[r]) void'(src[r].pop_front());
      gap[r] <= burst ? 1'b0 : ($urandom % 5 == 0);
    end

  // output space model
  int space[NP][N_VC];
  always_comb for (int o = 0; o < NP; o++) for (int v = 0; v < N_VC; v++) out_space[o][v] = SPW'(space[o][v]);

  // output checker
  int cur_id[NP], cur_cnt[NP];
  logic in_pkt[NP];
  int contention = 0, vct_wait = 0;
  int big_head_t = -1, big_foot_t = -1, cyc = 0, big_offer_t = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int o = 0; o < NP; o++) begin
      if (out_valid[o]) begin
        flit_t fl; fl = out_flit[o];
        checks++;
        for (int v = 0; v < N_VC; v++) if (out_vc[o] == 1'(v)) space[o][v]--;
        if (fl.kind == FK_HEAD) begin
          header_t h; int id; h = header_t'(fl.data); id = int'(h.rsvd[15:0]);
          if (in_pkt[o]) begin failures++; $display("port %0d: header inside a packet", o); end
          if (!exp_port.exists(id) || exp_port[id] != o || exp_vc[id] != int'(out_vc[o])) begin
            failures++; $display("packet %0d on port %0d vc %0d, wrong", id, o, out_vc[o]);
          end
          if (space[o][out_vc[o]] + 1 < int'(h.len) + 2) begin failures++; $display("VCT violated"); end
          in_pkt[o] = 1; cur_id[o] = id; cur_cnt[o] = 0;
          if (id == 9999) big_head_t = cyc;
        end else if (fl.kind == FK_DATA) begin
          if (!in_pkt[o] || fl.data[127:112] != 16'(cur_id[o]) || fl.data[111:96] != 16'(cur_cnt[o])) begin
            failures++; $display("port %0d: payload out of order", o);
          end
          cur_cnt[o]++;
        end else begin
          if (!in_pkt[o] || cur_cnt[o] != exp_len[cur_id[o]]) begin failures++; $display("port %0d: bad packet end", o); end
          in_pkt[o] = 0; delivered++;
          if (cur_id[o] == 9999) big_foot_t = cyc;
        end
      end
    end
    // refill
    for (int o = 0; o < NP; o++) for (int v = 0; v < N_VC; v++)
      if (space[o][v] < 24 && ($urandom % 3 == 0 || burst)) space[o][v]++;
    if (drop) ndrop++;
    for (int o = 0; o < NP; o++) if ($countones(dut.req[o]) > 1) contention++;
    for (int r = 0; r < NR; r++) if (dut.head[r] && !dut.rdrop[r] && !dut.want[r]) vct_wait++;
    if (big_offer_t < 0 && burst && src[0].size() != 0 && src[0][0].kind == FK_HEAD) big_offer_t = cyc;
  end

  initial begin
    for (int o = 0; o < NP; o++) for (int v = 0; v < N_VC; v++) space[o][v] = 24;
    for (int r = 0; r < NR; r++) gap[r] = 0;
    for (int o = 0; o < NP; o++) in_pkt[o] = 0;
    for (int r = 0; r < NR; r++)
      for (int k = 0; k < NPK; k++)
        make_packet(r, r * 1000 + k, 1 + $urandom % 14, $urandom % DS, $urandom % 4);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (delivered == total);
    repeat (20) @(posedge clk);
    checks++;
    if (ndrop != ndrop_exp) begin failures++; $display("drops %0d expected %0d", ndrop, ndrop_exp); end
    checks++;
    if (contention == 0) begin failures++; $display("no contention seen"); end
    checks++;
    if (vct_wait == 0) begin failures++; $display("no VCT wait seen"); end
    $display("contention cycles %0d, VCT wait cycles %0d, drops %0d", contention, vct_wait, ndrop);
    // rate phase
    for (int o = 0; o < NP; o++) for (int v = 0; v < N_VC; v++) space[o][v] = 1000;
    @(negedge clk);
    burst = 1;
    repeat (2) @(negedge clk);
    make_packet(0, 9999, 256, 0, 0);  // my=3 -> dst 0 is the plus link
    wait (big_foot_t > 0);
    checks++;
    if (big_foot_t - big_head_t != 257) begin failures++; $display("256-word packet took %0d cycles", big_foot_t - big_head_t); end
    checks++;
    if (big_head_t - big_offer_t != 1) begin failures++; $display("header latency %0d", big_head_t - big_offer_t); end
    $display("header latency %0d cycle(s), 256-word packet header-to-footer %0d cycles", big_head_t - big_offer_t, big_foot_t - big_head_t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
