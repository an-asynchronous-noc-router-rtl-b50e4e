// tb_crossbar: self-checking test of the IPM-to-OPM crossbar.
//
// Random request matrices and random one-hot-or-zero grants per OPM (only to
// a requesting IPM, with at most one OPM granting each IPM) are applied; the
// transposed requests, the flit multiplexed onto each OPM and the grants
// folded back to the IPMs are compared with values computed here.
module tb_crossbar;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS;
  logic  [NP-1:0][NP-1:0] ipm_req, opm_req, opm_gnt;
  flit_t [NP-1:0]         ipm_flit, opm_flit;
  logic  [NP-1:0][NP-1:0] ipm_gnt;
  int checks = 0, failures = 0;

  crossbar #(.NP(NP)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [NP-1:0] taken;
      logic [NP-1:0][NP-1:0] exp_gnt;
      taken = '0;
      exp_gnt = '0;
      for (int i = 0; i < NP; i++) begin
        ipm_flit[i] = flit_t'({$urandom, $urandom});
        ipm_req[i]  = '0;
        ipm_req[i][$urandom_range(0, NP - 1)] = $urandom_range(0, 3) != 0;
      end
      opm_gnt = '0;
      for (int j = 0; j < NP; j++) begin
        int i;
        i = $urandom_range(0, NP - 1);
        if (ipm_req[i][j] && !taken[i] && $urandom_range(0, 3) != 0) begin
          opm_gnt[j][i] = 1'b1;
          taken[i] = 1'b1;
          exp_gnt[i][j] = 1'b1;
        end
      end
      #1;
      for (int j = 0; j < NP; j++) begin
        flit_t exp_f;
        exp_f = '0;
        for (int i = 0; i < NP; i++) begin
          checks++;
          if (opm_req[j][i] !== ipm_req[i][j]) failures++;
          if (opm_gnt[j][i]) exp_f = ipm_flit[i];
        end
        checks++;
        if (opm_flit[j] !== exp_f) begin
          failures++;
          $display("FAIL flit to OPM %0d", j);
        end
      end
      checks++;
      if (ipm_gnt !== exp_gnt) begin
        failures++;
        $display("FAIL ipm_gnt %b exp %b", ipm_gnt, exp_gnt);
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
