// apr_imagifier_tb: random events (1 to 5 hit words, random valid slots)
// go in; each output image is compared with an image built by the test,
// and the destination must cycle through the configured targets. The
// output is stalled at random. Also checks the output timing: the image
// leaves in the two cycles after the last hit word when not stalled.
module apr_imagifier_tb;
  import apr_pkg::*;
  localparam int NT = 3;
  localparam int TW = $clog2(NT + 1);
  logic clk = 0, rst_n = 0;
  logic [TW-1:0] n_targets;
  dest_t [NT-1:0] target;
  logic s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  logic [FLIT_W-1:0] s_tdata, m_tdata;
  dest_t m_tuser;
  int checks = 0, failures = 0;
  logic stress = 1;

  apr_imagifier #(.N_TARGETS(NT)) dut (.*);
  always #5 clk = ~clk;

  logic [255:0] iq[$];
  int nev = 0, nout = 0, half = 0;
  logic [255:0] acc;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) m_tready = !stress || ($urandom % 3 != 0);
  always @(posedge clk) if (rst_n && m_tvalid && m_tready) begin
    checks++;
    if (half == 0) begin
      if (m_tlast || m_tdata != iq[0][127:0]) begin failures++; $display("image low half wrong"); end
      if (m_tuser != target[nout % int'(n_targets)]) begin failures++; $display("wrong target"); end
      half = 1;
    end else begin
      if (!m_tlast || m_tdata != iq[0][255:128]) begin failures++; $display("image high half wrong"); end
      void'(iq.pop_front()); half = 0; nout++;
    end
  end

  task automatic send_event(int nw);
    logic [255:0] img; img = '0;
    for (int w = 0; w < nw; w++) begin
      logic [FLIT_W-1:0] d;
      for (int k = 0; k < 8; k++) begin
        logic [7:0] pmt; logic v;
        pmt = 8'($urandom); v = 1'($urandom);
        d[16*k +: 16] = {v, 7'($urandom), pmt};
        if (v) img[pmt] = 1'b1;
      end
      @(negedge clk);
      while (stress && $urandom % 4 == 0) @(negedge clk);
      s_tvalid = 1; s_tdata = d; s_tlast = (w == nw - 1);
      if (w == nw - 1) iq.push_back(img);
      @(posedge clk); while (!s_tready) @(posedge clk);
      @(negedge clk) s_tvalid = 0;
    end
  endtask

  initial begin
    int t0, t1;
    n_targets = TW'(NT);
    for (int t = 0; t < NT; t++) target[t] = dest_t'($urandom);
    s_tvalid = 0; s_tlast = 0; s_tdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 300; e++) send_event(1 + $urandom % 5);
    wait (nout == 300);
    // timing: one single-word event, no stalls
    stress = 0;
    @(negedge clk);
    fork
      send_event(1);
      begin
        @(posedge clk iff (s_tvalid && s_tlast)); t0 = $time;
        @(posedge clk iff (m_tvalid && m_tlast)); t1 = $time;
      end
    join
    @(posedge clk);
    checks++;
    if ((t1 - t0) / 10 != 2) begin failures++; $display("image out %0d cycles after last hit word", (t1 - t0) / 10); end
    $display("events %0d, last image word %0d cycles after last hit word", nout, (t1 - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
