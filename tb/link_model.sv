// link_model: behavioural stand-in for the Network IP link between two
// nodes (the transceiver layer is not part of this RTL). Carries flits one
// way and credits the other way, each with a fixed delay of LAT cycles.
// When 'corrupt' is high, the first payload flit whose bits 127:96 equal
// CORRUPT_TAG has bit 0 inverted, once, to exercise footer checking.
module link_model
  import apr_pkg::*;
#(
  parameter int LAT = 4,
  parameter logic [31:0] CORRUPT_TAG = 32'hBAD0_0BAD
) (
  input  logic            clk,
  input  logic            corrupt,
  input  link_t           a_tx,       // from the sending node
  output link_t           b_rx,       // to the receiving node
  input  logic [N_VC-1:0] b_credit,   // credits from the receiving node
  output logic [N_VC-1:0] a_credit,   // credits to the sending node
  output int              corrupted
);
  link_t           fpipe[LAT];
  logic [N_VC-1:0] cpipe[LAT];
  logic            done = 0;
  initial corrupted = 0;
  initial for (int i = 0; i < LAT; i++) begin fpipe[i] = '0; cpipe[i] = '0; end

  always_ff @(posedge clk) begin
    link_t f;
    f = a_tx;
    if (corrupt && !done && f.valid && f.flit.kind == FK_DATA && f.flit.data[127:96] == CORRUPT_TAG) begin
      f.flit.data[0] = ~f.flit.data[0];
      done <= 1;
      corrupted <= corrupted + 1;
    end
    fpipe[0] <= f;
    cpipe[0] <= b_credit;
    for (int i = 1; i < LAT; i++) begin
      fpipe[i] <= fpipe[i-1];
      cpipe[i] <= cpipe[i-1];
    end
  end
  assign b_rx     = fpipe[LAT-1];
  assign a_credit = cpipe[LAT-1];
endmodule
