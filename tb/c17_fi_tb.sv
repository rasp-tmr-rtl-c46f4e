// c17_fi_tb: self-checking test of one fault-injectable c17 copy.
//
// Every input pattern (32) is applied with every fault location (4) and
// every fault mode (none, bit-flip, stuck-at-0, stuck-at-1). The expected
// outputs come from a net-by-net model in this testbench that replaces the
// selected internal net by its faulty value. The test also requires that
// each location and mode (other than none) changes an output for at least
// one pattern, so that a fault that is silently ignored is caught.
module c17_fi_tb;
  import rasp_tmr_pkg::*;

  logic N1, N2, N3, N6, N7, N22, N23;
  fault_sel_t  fault_sel;
  fault_mode_e fault_mode;

  int checks = 0;
  int failures = 0;
  int visible [4][4];

  c17_fi dut (.*);

  // Reference with an independent fault model: site k of {N10,N11,N16,N19}.
  function automatic logic [1:0] ref_out(logic [4:0] in, int site, int mode);
    logic a1, a2, a3, a6, a7;
    logic [3:0] net;
    {a7, a6, a3, a2, a1} = in;
    net[0] = !(a1 && a3);
    if (site == 0) net[0] = (mode == 1) ? !net[0] : (mode == 2) ? 1'b0 : (mode == 3) ? 1'b1 : net[0];
    net[1] = !(a3 && a6);
    if (site == 1) net[1] = (mode == 1) ? !net[1] : (mode == 2) ? 1'b0 : (mode == 3) ? 1'b1 : net[1];
    net[2] = !(a2 && net[1]);
    if (site == 2) net[2] = (mode == 1) ? !net[2] : (mode == 2) ? 1'b0 : (mode == 3) ? 1'b1 : net[2];
    net[3] = !(net[1] && a7);
    if (site == 3) net[3] = (mode == 1) ? !net[3] : (mode == 2) ? 1'b0 : (mode == 3) ? 1'b1 : net[3];
    return {!(net[0] && net[2]), !(net[2] && net[3])};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp_o, clean;
    foreach (visible[s, m]) visible[s][m] = 0;
    for (int m = 0; m < 4; m++) begin
      for (int s = 0; s < 4; s++) begin
        for (int i = 0; i < 32; i++) begin
          fault_mode = fault_mode_e'(m);
          fault_sel  = fault_sel_t'(s);
          {N7, N6, N3, N2, N1} = 5'(i);
          #1;
          exp_o = ref_out(5'(i), s, m);
          clean = ref_out(5'(i), s, 0);
          if (exp_o != clean) visible[s][m]++;
          checks++;
          if ({N22, N23} !== exp_o) begin
            failures++;
            $display("mode=%0d site=%0d in=%05b got %b%b expected %b", m, s, 5'(i), N22, N23, exp_o);
          end
        end
      end
    end
    for (int s = 0; s < 4; s++)
      for (int m = 1; m < 4; m++) begin
        checks++;
        if (visible[s][m] == 0) begin
          failures++;
          $display("fault site %0d mode %0d never reached an output", s, m);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
