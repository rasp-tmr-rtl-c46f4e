// tmr_top_tb: self-checking test of the c17 TMR top file.
//
// Part 1 applies every single fault (3 copies x 4 locations x 3 modes) with
// all 32 input patterns: the voted outputs must equal the fault-free c17
// outputs. Part 2 applies random fault commands to all three copies at once;
// the expected outputs are then the bitwise majority of three reference
// copies modelled in this testbench, so the test also shows which copy
// feeds which voter input. Counters show that single faults did corrupt
// their copy (and were masked) and that double faults did get through.
module tmr_top_tb;
  import rasp_tmr_pkg::*;

  logic N1, N2, N3, N6, N7, N22, N23;
  fault_sel_t  faultIn1, faultIn2, faultIn3;
  fault_mode_e fault_mode1, fault_mode2, fault_mode3;

  int checks = 0;
  int failures = 0;
  int masked [3];
  int double_visible = 0;

  tmr_top dut (.*);

  function automatic logic flt(logic v, int mode);
    return (mode == 1) ? !v : (mode == 2) ? 1'b0 : (mode == 3) ? 1'b1 : v;
  endfunction

  // One c17 copy, fault on site {N10,N11,N16,N19}[site].
  function automatic logic [1:0] ref_copy(logic [4:0] in, int site, int mode);
    logic a1, a2, a3, a6, a7, n10, n11, n16, n19;
    {a7, a6, a3, a2, a1} = in;
    n10 = !(a1 && a3);   if (site == 0) n10 = flt(n10, mode);
    n11 = !(a3 && a6);   if (site == 1) n11 = flt(n11, mode);
    n16 = !(a2 && n11);  if (site == 2) n16 = flt(n16, mode);
    n19 = !(n11 && a7);  if (site == 3) n19 = flt(n19, mode);
    return {!(n10 && n16), !(n16 && n19)};
  endfunction

  task automatic apply(logic [4:0] in, int s[3], int m[3]);
    logic [1:0] r [3];
    logic [1:0] expv, clean;
    {N7, N6, N3, N2, N1} = in;
    faultIn1 = fault_sel_t'(s[0]); fault_mode1 = fault_mode_e'(m[0]);
    faultIn2 = fault_sel_t'(s[1]); fault_mode2 = fault_mode_e'(m[1]);
    faultIn3 = fault_sel_t'(s[2]); fault_mode3 = fault_mode_e'(m[2]);
    #1;
    for (int k = 0; k < 3; k++) r[k] = ref_copy(in, s[k], m[k]);
    expv  = (r[0] & r[1]) | (r[0] & r[2]) | (r[1] & r[2]);
    clean = ref_copy(in, 0, 0);
    for (int k = 0; k < 3; k++)
      if (r[k] != clean && r[(k+1)%3] == clean && r[(k+2)%3] == clean) masked[k]++;
    if (expv != clean) double_visible++;
    checks++;
    if ({N22, N23} !== expv) begin
      failures++;
      $display("in=%05b sel=%0d/%0d/%0d mode=%0d/%0d/%0d got %b%b expected %b",
               in, s[0], s[1], s[2], m[0], m[1], m[2], N22, N23, expv);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s[3], m[3];
    int single_checks;
    masked = '{0, 0, 0};
    // Part 1: fault-free and every single fault.
    for (int k = 0; k < 3; k++)
      for (int mode = 0; mode < 4; mode++)
        for (int site = 0; site < 4; site++)
          for (int i = 0; i < 32; i++) begin
            s = '{0, 0, 0};
            m = '{0, 0, 0};
            s[k] = site;
            m[k] = mode;
            apply(5'(i), s, m);
          end
    single_checks = checks;
    checks++;
    if (double_visible != 0) begin
      failures++;
      $display("a single fault reached the outputs %0d times", double_visible);
    end
    // Part 2: random faults in several copies at once.
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < 3; k++) begin
        s[k] = $urandom_range(3);
        m[k] = $urandom_range(3);
      end
      apply(5'($urandom), s, m);
    end
    for (int k = 0; k < 3; k++) begin
      $display("copy %0d: %0d corrupted outputs masked", k + 1, masked[k]);
      checks++;
      if (masked[k] == 0) begin
        failures++;
        $display("no fault of copy %0d ever corrupted it", k + 1);
      end
    end
    $display("multi-fault patterns that reached the outputs: %0d", double_visible);
    checks++;
    if (double_visible == 0) begin
      failures++;
      $display("no multi-fault case ever defeated the voter");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
