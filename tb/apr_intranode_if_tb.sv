// apr_intranode_if_tb: packets are written to the outgoing header/data
// FIFOs (payload first, header last). The injected flits are checked (header,
// payload, footer with an independently computed checksum) and looped back
// into the eject side whenever ej_space admits the whole packet. The
// incoming header/data FIFOs are read at random and compared. One payload
// flit is corrupted on the loop and must raise csum_err exactly once.
module apr_intranode_if_tb;
  import apr_pkg::*;
  localparam int HD = 2, DD = 16;
  localparam int SW = $clog2(DD + 3);
  logic clk = 0, rst_n = 0;
  logic ohdr_wr, ohdr_full, odat_wr, odat_full, ihdr_rd, ihdr_empty, idat_rd, idat_empty;
  header_t ohdr_data, ihdr_data;
  logic [FLIT_W-1:0] odat_data, idat_data;
  logic inj_valid, inj_ready, ej_valid, csum_err;
  flit_t inj_flit, ej_flit;
  logic [SW-1:0] ej_space;
  int checks = 0, failures = 0, errs = 0, full_seen = 0;
  localparam int NPKT = 200;

  apr_intranode_if #(.HDR_DEPTH(HD), .DATA_DEPTH(DD)) dut (.*);
  always #5 clk = ~clk;

  header_t           hq[$];   // headers in flight (inject check)
  logic [FLIT_W-1:0] dq[$];
  header_t           rhq[$];  // expected at the eject FIFOs
  logic [FLIT_W-1:0] rdq[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] fold(logic [FLIT_W-1:0] w);
    return w[31:0] ^ w[63:32] ^ w[95:64] ^ w[127:96];
  endfunction

  // producer (Aggregator role)
  initial begin
    ohdr_wr = 0; odat_wr = 0; ohdr_data = '0; odat_data = '0;
    wait (rst_n);
    for (int p = 0; p < NPKT; p++) begin
      header_t h;
      h = '0;
      h.len = LEN_W'(1 + $urandom % 8);
      h.dst_ch = CH_W'(p);
      for (int i = 0; i < int'(h.len); i++) begin
        @(negedge clk);
        while (odat_full) @(negedge clk);
        odat_wr = 1; odat_data = {$urandom, $urandom, $urandom, $urandom};
        dq.push_back(odat_data);
        @(negedge clk); odat_wr = 0;
      end
      @(negedge clk);
      while (ohdr_full) @(negedge clk);
      ohdr_wr = 1; ohdr_data = h; hq.push_back(h);
      @(negedge clk); ohdr_wr = 0;
    end
  end

  // inject check and loop-back (switch role)
  typedef enum {L_IDLE, L_PKT} lst_e;
  lst_e lst = L_IDLE;
  header_t inj_hdr;
  assign inj_hdr = header_t'(inj_flit.data);
  int rem = 0, pkts = 0;
  logic [31:0] cs;
  logic corrupt_done = 0;
  always_comb begin
    inj_ready = 0;
    if (inj_valid) begin
      if (lst == L_IDLE) inj_ready = (inj_flit.kind == FK_HEAD) &&
                                     (int'(ej_space) >= int'(inj_hdr.len) + 2);
      else inj_ready = 1'b1;
    end
  end
  always_ff @(posedge clk) begin
    ej_valid <= 0;
    if (rst_n && inj_valid && inj_ready) begin
      ej_valid <= 1;
      ej_flit  <= inj_flit;
      checks++;
      if (lst == L_IDLE) begin
        header_t h; h = header_t'(inj_flit.data);
        if (hq.size() == 0 || h != hq[0]) begin failures++; $display("header mismatch"); end
        else begin void'(hq.pop_front()); rhq.push_back(h); end
        rem <= int'(h.len); cs <= 0; lst <= L_PKT;
      end else if (rem > 0) begin
        if (inj_flit.kind != FK_DATA || dq.size() == 0 || inj_flit.data != dq[0]) begin failures++; $display("data mismatch"); end
        else rdq.push_back(dq.pop_front());
        cs <= cs ^ fold(inj_flit.data);
        rem <= rem - 1;
        if (!corrupt_done && pkts == 50) begin
          ej_flit.data[3] <= ~inj_flit.data[3];
          corrupt_done <= 1;
          rdq[$][3] = ~rdq[$][3];
        end
      end else begin
        footer_t f; f = footer_t'(inj_flit.data);
        if (inj_flit.kind != FK_FOOT || f.csum != cs) begin failures++; $display("footer mismatch"); end
        lst <= L_IDLE; pkts <= pkts + 1;
      end
    end
    if (rst_n && csum_err) errs++;
    if (rst_n && ihdr_empty == 0 && dut.u_ihdr.full) begin
      if (ej_space != 0) begin failures++; $display("space not 0 with header FIFO full"); end
      full_seen++;
    end
  end

  // consumer (Dispatcher role)
  initial begin
    int done = 0;
    ihdr_rd = 0; idat_rd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (done < NPKT) begin
      header_t h;
      @(negedge clk);
      ihdr_rd = 0; idat_rd = 0;
      if (!ihdr_empty && $urandom % 4 == 0) begin
        h = ihdr_data;
        ihdr_rd = 1;
        checks++;
        if (rhq.size() == 0 || h != rhq[0]) begin failures++; $display("eject header mismatch"); end
        else void'(rhq.pop_front());
        @(negedge clk); ihdr_rd = 0;
        for (int i = 0; i < int'(h.len); i++) begin
          while (idat_empty || $urandom % 2) @(negedge clk);
          idat_rd = 1; checks++;
          if (rdq.size() == 0 || idat_data != rdq[0]) begin failures++; $display("eject data mismatch"); end
          else void'(rdq.pop_front());
          @(negedge clk); idat_rd = 0;
        end
        done++;
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (errs != 1) begin failures++; $display("csum errors %0d, expected 1", errs); end
    checks++;
    if (full_seen == 0) begin failures++; $display("header FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
