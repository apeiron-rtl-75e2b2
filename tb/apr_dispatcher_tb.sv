// apr_dispatcher_tb: packets (header FIFO + data FIFO modelled by the test)
// for four channels, some split over several packets, some for a channel
// the task does not have. Channel outputs are read with random ready.
// Checks each channel's words and order, TLAST only at end of message,
// TUSER = sender, that bad-channel packets are dropped and flagged, that a
// blocked channel stalls the Dispatcher, and the rate: a 100-word packet's
// header and words are read on 101 consecutive clock edges.
module apr_dispatcher_tb;
  import apr_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  logic ihdr_rd, ihdr_empty, idat_rd, idat_empty, bad_ch;
  header_t ihdr_data;
  logic [FLIT_W-1:0] idat_data;
  logic [NC-1:0] m_tvalid, m_tready, m_tlast;
  logic [NC-1:0][FLIT_W-1:0] m_tdata;
  dest_t [NC-1:0] m_tuser;
  int checks = 0, failures = 0, bad = 0, bad_exp = 0, stalls = 0;
  logic stress = 1;

  apr_dispatcher #(.N_IN_CH(NC), .CH_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  header_t hq[$];
  logic [FLIT_W-1:0] dq[$];
  typedef struct { logic [FLIT_W-1:0] w; logic last; dest_t src; } exp_t;
  exp_t eq[NC][$];
  int total = 0, got = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign ihdr_empty = (hq.size() == 0);
  assign ihdr_data  = (hq.size() != 0) ? hq[0] : '0;
  assign idat_empty = (dq.size() == 0) || (stress && $urandom % 7 == 0);
  assign idat_data  = (dq.size() != 0) ? dq[0] : '0;
  always @(posedge clk) if (rst_n) begin
    if (ihdr_rd) void'(hq.pop_front());
    if (idat_rd) void'(dq.pop_front());
    if (bad_ch) bad++;
    if (dut.st == 1 && !idat_empty && !idat_rd) stalls++;
  end

  task automatic add_msg(int ch, int len, int tag);
    int left, idx; header_t h;
    left = len; idx = 0;
    while (left > 0) begin
      int n; n = (left > 100) ? 100 : left;
      h = '0; h.dst_ch = CH_W'(ch); h.len = LEN_W'(n); h.eom = (n == left);
      h.src_coord = coord_t'(tag); h.src_task = 2'(tag); h.src_ch = CH_W'(tag);
      hq.push_back(h);
      for (int i = 0; i < n; i++) begin
        logic [FLIT_W-1:0] w; w = {32'(tag), 32'(idx), 64'($urandom)};
        dq.push_back(w);
        if (ch < NC) begin
          eq[ch].push_back('{w: w, last: (i == n - 1) && h.eom, src: '{coord: h.src_coord, task_id: h.src_task, ch: h.src_ch}});
          total++;
        end
        idx++;
      end
      if (ch >= NC) bad_exp++;
      left -= n;
    end
  endtask

  always @(negedge clk) for (int c = 0; c < NC; c++) m_tready[c] = !stress || ($urandom % 3 != 0);
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < NC; c++) if (m_tvalid[c] && m_tready[c]) begin
      checks++; got++;
      if (eq[c].size() == 0 || m_tdata[c] != eq[c][0].w || m_tlast[c] != eq[c][0].last || m_tuser[c] != eq[c][0].src) begin
        failures++; $display("channel %0d mismatch", c);
      end else void'(eq[c].pop_front());
    end

  initial begin
    int t0, t1;
    for (int m = 0; m < 40; m++) add_msg(($urandom % 5 == 0) ? NC + $urandom % 100 : $urandom % NC, 1 + $urandom % 250, m);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got == total && hq.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (bad != bad_exp) begin failures++; $display("bad channel %0d vs %0d", bad, bad_exp); end
    checks++;
    if (stalls == 0) begin failures++; $display("no backpressure stall"); end
    stress = 0;
    @(negedge clk);
    add_msg(1, 100, 99);
    t0 = $time;
    wait (dq.size() == 0);
    t1 = $time;
    wait (got == total);
    repeat (3) @(posedge clk);
    checks++;
    if ((t1 - t0) / 10 != 100) begin failures++; $display("100-word packet took %0d cycles", (t1 - t0) / 10); end
    $display("bad-channel drops %0d, stall cycles %0d, 100-word packet in %0d cycles", bad, stalls, (t1 - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
