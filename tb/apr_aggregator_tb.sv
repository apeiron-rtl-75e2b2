// apr_aggregator_tb: three task output channels send random messages
// (1 to 600 words, so some are split into several 256-word packets) with
// random destinations and random gaps. The outgoing header/data FIFOs are
// modelled with random 'full'. Checks every header field, that each header
// follows exactly its payload, the split at 256 words with the
// end-of-message flag, that messages are not interleaved, and the rate: a
// waiting 256-word message is moved at one word per cycle.
module apr_aggregator_tb;
  import apr_pkg::*;
  localparam int NC = 3;
  logic clk = 0, rst_n = 0;
  coord_t my_coord;
  logic [TASK_W-1:0] my_task;
  logic [NC-1:0] s_tvalid, s_tready, s_tlast;
  logic [NC-1:0][FLIT_W-1:0] s_tdata;
  dest_t [NC-1:0] s_tuser;
  logic ohdr_wr, ohdr_full, odat_wr, odat_full;
  header_t ohdr_data;
  logic [FLIT_W-1:0] odat_data;
  int checks = 0, failures = 0, splits = 0;
  logic stress = 1;

  apr_aggregator #(.N_OUT_CH(NC), .CH_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;
  assign my_coord = coord_t'(12'h5a3);
  assign my_task  = 2'd2;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { dest_t d; int len; int ch; int id; } msg_t;
  msg_t msgs[NC][$];     // expected, per channel, in order
  int   nmsg = 0, done = 0;

  // senders
  for (genvar c = 0; c < NC; c++) begin : g_src
    initial begin
      s_tvalid[c] = 0; s_tlast[c] = 0; s_tdata[c] = '0; s_tuser[c] = '0;
      wait (rst_n);
      for (int m = 0; m < 12; m++) begin
        msg_t x;
        x.d = dest_t'($urandom); x.len = ($urandom % 4 == 0) ? 200 + $urandom % 400 : 1 + $urandom % 20;
        x.ch = c; x.id = c * 100 + m;
        msgs[c].push_back(x);
        for (int i = 0; i < x.len; i++) begin
          @(negedge clk);
          while (stress && $urandom % 4 == 0) @(negedge clk);
          s_tvalid[c] = 1; s_tdata[c] = {32'(x.id), 32'(i), 64'($urandom)}; s_tuser[c] = x.d;
          s_tlast[c] = (i == x.len - 1);
          @(posedge clk);
          while (!s_tready[c]) @(posedge clk);
          @(negedge clk) s_tvalid[c] = 0;
        end
      end
    end
  end

  // FIFO model
  always @(negedge clk) begin
    ohdr_full = stress && ($urandom % 5 == 0);
    odat_full = stress && ($urandom % 6 == 0);
  end

  int cur_ch = -1, cur_idx = 0, in_msg = 0, pkt_words = 0;
  logic [FLIT_W-1:0] pend[$];
  always @(posedge clk) if (rst_n) begin
    if (odat_wr) begin
      if (odat_full) begin failures++; $display("write while full"); end
      pend.push_back(odat_data);
    end
    if (ohdr_wr) begin
      msg_t x; int id, ch, first;
      checks++;
      if (ohdr_full) begin failures++; $display("header write while full"); end
      ch = int'(ohdr_data.src_ch);
      if (ch >= NC || msgs[ch].size() == 0) begin failures++; $display("bad source channel %0d", ch); end
      else begin
        x = msgs[ch][0];
        first = int'(pend[0][95:64]);
        if (ohdr_data.dst_coord != x.d.coord || ohdr_data.dst_task != x.d.task_id || ohdr_data.dst_ch != x.d.ch
            || ohdr_data.src_coord != my_coord || ohdr_data.src_task != my_task) begin
          failures++; $display("header fields wrong");
        end
        if (int'(ohdr_data.len) != pend.size() || pend.size() == 0) begin failures++; $display("len %0d vs %0d words", ohdr_data.len, pend.size()); end
        for (int i = 0; i < pend.size(); i++)
          if (int'(pend[i][127:96]) != x.id || int'(pend[i][95:64]) != first + i) begin
            failures++; $display("payload word %0d wrong", i); break;
          end
        if (first != (in_msg ? cur_idx : 0)) begin failures++; $display("message interleaved"); end
        begin
          int end_idx; end_idx = first + pend.size();
          if (end_idx == x.len) begin
            if (!ohdr_data.eom) begin failures++; $display("eom missing"); end
            void'(msgs[ch].pop_front()); done++; in_msg = 0;
          end else begin
            if (ohdr_data.eom || pend.size() != MAX_LEN) begin failures++; $display("bad split"); end
            splits++; in_msg = 1; cur_idx = end_idx;
          end
        end
      end
      pend.delete();
    end
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done == 3 * 12);
    checks++;
    if (splits == 0) begin failures++; $display("no message was split"); end
    // rate: one channel, no stalls, 256-word message
    stress = 0;
    @(negedge clk);
    for (int i = 0; i < 256; i++) msgs[0].push_back('{d: '0, len: 256, ch: 0, id: 777});
    msgs[0] = msgs[0][0:0];
    fork
      begin
        for (int i = 0; i < 256; i++) begin
          s_tvalid[0] = 1; s_tdata[0] = {32'd777, 32'(i), 64'd0}; s_tuser[0] = '0; s_tlast[0] = (i == 255);
          @(posedge clk); while (!s_tready[0]) @(posedge clk);
          @(negedge clk);
        end
        s_tvalid[0] = 0;
      end
      begin
        @(posedge odat_wr); t0 = $time;
        @(posedge ohdr_wr); t1 = $time;
      end
    join
    repeat (5) @(posedge clk);
    checks++;
    if ((t1 - t0) / 10 != 256) begin failures++; $display("256 words took %0d cycles", (t1 - t0) / 10); end
    $display("splits %0d, 256-word message moved in %0d cycles", splits, (t1 - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
