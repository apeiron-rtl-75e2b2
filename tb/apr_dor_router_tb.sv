// apr_dor_router_tb: exhaustive check of the route computation on a 4x4x3
// torus against an independent model: dimension order (highest first),
// shortest direction, dateline VC rule, IntraNode delivery and drop.
module apr_dor_router_tb;
  import apr_pkg::*;
  localparam int ND = 3, DS = 4, NI = 3;
  localparam int NP = NI + 2 * ND, PW = $clog2(NP);
  coord_t my_coord, dst_coord;
  logic [TASK_W-1:0] dst_task;
  logic in_is_link, in_vc, out_vc, drop;
  logic [PW-1:0] in_port, out_port;
  int checks = 0, failures = 0;

  apr_dor_router #(.N_DIMS(ND), .DIM_SIZE(DS), .N_INTRA(NI)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int ep, evc, edrop, d, fwd, bwd;
      my_coord = '0; dst_coord = '0;
      for (int k = 0; k < ND; k++) begin
        my_coord[k]  = COORD_W'($urandom % DS);
        dst_coord[k] = COORD_W'($urandom % DS);
      end
      if ($urandom % 4 == 0) dst_coord = my_coord;
      dst_task   = TASK_W'($urandom);
      in_is_link = 1'($urandom);
      in_port    = in_is_link ? PW'(NI + $urandom % (2 * ND)) : PW'($urandom % NI);
      in_vc      = in_is_link ? 1'($urandom) : 1'b0;
      #1;
      // model
      d = -1;
      for (int k = ND - 1; k >= 0; k--) if (d < 0 && dst_coord[k] != my_coord[k]) d = k;
      if (d < 0) begin
        ep = dst_task; evc = 0; edrop = (dst_task >= NI);
      end else begin
        int minus, straight;
        edrop = 0;
        fwd = (dst_coord[d] - my_coord[d] + DS) % DS;
        bwd = DS - fwd;
        minus = (bwd < fwd);
        ep = NI + 2 * d + minus;
        straight = in_is_link && (in_port == NI + 2 * d + (1 - minus));
        evc = straight ? in_vc : 0;
        if (!minus && my_coord[d] == DS - 1) evc = 1;
        if (minus && my_coord[d] == 0) evc = 1;
      end
      checks++;
      if (drop != 1'(edrop) || (!edrop && (out_port != PW'(ep) || (d >= 0 && out_vc != 1'(evc))))) begin
        failures++;
        if (failures < 10)
          $display("my=%h dst=%h task=%0d in=%0d/%0d: got port %0d vc %0d drop %0d, expected %0d %0d %0d",
                   my_coord, dst_coord, dst_task, in_port, in_vc, out_port, out_vc, drop, ep, evc, edrop);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
