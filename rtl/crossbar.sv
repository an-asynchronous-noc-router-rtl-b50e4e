// crossbar: the 5x5 connection between Input and Output Port Modules.
//
// Requests from each IPM are transposed so that every OPM sees one request
// bit per IPM; each OPM's one-hot grant steers an AND-OR multiplexer that
// puts the granted IPM's flit on that OPM's input, and the grants are
// transposed back so every IPM sees which OPM took its flit.
//
// Interface: ipm_req[i][j] = IPM i requests OPM j; opm_gnt[j][i] = OPM j
// grants IPM i; ipm_gnt[i][j] = the same grant seen from IPM i. Purely
// combinational.
//
// That IPMs reach OPMs through a crossbar is the router's structure; the
// AND-OR multiplexer form is this design's own.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned NP = NUM_PORTS
) (
  input  logic  [NP-1:0][NP-1:0] ipm_req,
  input  flit_t [NP-1:0]         ipm_flit,
  output logic  [NP-1:0][NP-1:0] ipm_gnt,
  output logic  [NP-1:0][NP-1:0] opm_req,
  input  logic  [NP-1:0][NP-1:0] opm_gnt,
  output flit_t [NP-1:0]         opm_flit
);
  always_comb begin
    opm_flit = '0;
    for (int j = 0; j < NP; j++) begin
      for (int i = 0; i < NP; i++) begin
        opm_req[j][i] = ipm_req[i][j];
        ipm_gnt[i][j] = opm_gnt[j][i];
        if (opm_gnt[j][i]) opm_flit[j] = opm_flit[j] | ipm_flit[i];
      end
    end
  end
endmodule
