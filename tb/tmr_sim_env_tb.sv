// tmr_sim_env_tb: end-to-end fault-injection run of the c17 TMR design.
//
// It replays the verification scenario of the design: a 20 ns clock advances
// a 5-bit counter e that supplies the five inputs, so all 32 patterns are
// applied in turn, and the fault number of the copy under test steps through
// 0, 1, 2, 3 every four clocks. This is done for each copy (1, 2, 3) and each
// fault mode (bit-flip, stuck-at-0, stuck-at-1), two full input sweeps each;
// cmp must stay 0 throughout. A fault-free sweep follows, then a sweep with
// faults in two copies at once, where cmp must be 1 exactly when the
// majority of the reference copies differs from the fault-free result.
//
// Mechanisms counted (each must occur at least once): a fault that corrupts
// copy 1, 2 and 3 and is masked; a fault-free pattern; a double fault
// flagged by cmp = 1. The expected values come from a model of c17 with
// faults written in this testbench.
module tmr_sim_env_tb;
  import rasp_tmr_pkg::*;

  logic clk = 1'b0;
  logic [4:0] e;
  logic N1, N2, N3, N6, N7, N22, N23, cmp;
  fault_sel_t  faultIn1, faultIn2, faultIn3;
  fault_mode_e fault_mode1, fault_mode2, fault_mode3;

  int checks = 0;
  int failures = 0;
  int masked [3];
  int fault_free = 0;
  int flagged = 0;
  int cycles = 0;

  tmr_sim_env dut (.*);

  always #10 clk = ~clk;
  always @(posedge clk) cycles++;

  assign {N7, N6, N3, N2, N1} = e;

  function automatic logic flt(logic v, int mode);
    return (mode == 1) ? !v : (mode == 2) ? 1'b0 : (mode == 3) ? 1'b1 : v;
  endfunction

  function automatic logic [1:0] ref_copy(logic [4:0] in, int site, int mode);
    logic a1, a2, a3, a6, a7, n10, n11, n16, n19;
    {a7, a6, a3, a2, a1} = in;
    n10 = !(a1 && a3);   if (site == 0) n10 = flt(n10, mode);
    n11 = !(a3 && a6);   if (site == 1) n11 = flt(n11, mode);
    n16 = !(a2 && n11);  if (site == 2) n16 = flt(n16, mode);
    n19 = !(n11 && a7);  if (site == 3) n19 = flt(n19, mode);
    return {!(n10 && n16), !(n16 && n19)};
  endfunction

  // Check the outputs just before the next clock edge changes the inputs.
  task automatic check_cycle();
    logic [1:0] r [3];
    logic [1:0] clean, expv;
    logic exp_cmp;
    int nbad;
    @(negedge clk);
    r[0] = ref_copy(e, int'(faultIn1), int'(fault_mode1));
    r[1] = ref_copy(e, int'(faultIn2), int'(fault_mode2));
    r[2] = ref_copy(e, int'(faultIn3), int'(fault_mode3));
    clean = ref_copy(e, 0, 0);
    expv = (r[0] & r[1]) | (r[0] & r[2]) | (r[1] & r[2]);
    exp_cmp = (expv != clean);
    nbad = 0;
    for (int k = 0; k < 3; k++) if (r[k] != clean) nbad++;
    if (nbad == 0) fault_free++;
    if (nbad == 1)
      for (int k = 0; k < 3; k++) if (r[k] != clean) masked[k]++;
    if (cmp) flagged++;
    checks++;
    if (cmp !== exp_cmp || {N22, N23} !== expv) begin
      failures++;
      $display("t=%0t e=%0d faultIn=%0d/%0d/%0d mode=%0d/%0d/%0d cmp=%b exp %b out=%b%b exp %b",
               $time, e, faultIn1, faultIn2, faultIn3, fault_mode1, fault_mode2, fault_mode3,
               cmp, exp_cmp, N22, N23, expv);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    masked = '{0, 0, 0};
    e = '0;
    faultIn1 = '0; faultIn2 = '0; faultIn3 = '0;
    fault_mode1 = FM_NONE; fault_mode2 = FM_NONE; fault_mode3 = FM_NONE;
    // Single-copy fault campaigns.
    for (int k = 0; k < 3; k++) begin
      for (int mode = 1; mode < 4; mode++) begin
        fault_mode1 = (k == 0) ? fault_mode_e'(mode) : FM_NONE;
        fault_mode2 = (k == 1) ? fault_mode_e'(mode) : FM_NONE;
        fault_mode3 = (k == 2) ? fault_mode_e'(mode) : FM_NONE;
        for (int c = 0; c < 64; c++) begin
          @(posedge clk);
          e <= 5'(c);
          case (k)
            0: faultIn1 <= fault_sel_t'(c / 4);
            1: faultIn2 <= fault_sel_t'(c / 4);
            default: faultIn3 <= fault_sel_t'(c / 4);
          endcase
          check_cycle();
        end
      end
    end
    // Fault-free sweep.
    fault_mode1 = FM_NONE; fault_mode2 = FM_NONE; fault_mode3 = FM_NONE;
    for (int c = 0; c < 32; c++) begin
      @(posedge clk);
      e <= 5'(c);
      check_cycle();
    end
    // Two faulty copies at once: the voter can no longer mask every pattern.
    for (int c = 0; c < 256; c++) begin
      @(posedge clk);
      e <= 5'(c);
      faultIn1 <= fault_sel_t'($urandom_range(3));
      faultIn2 <= fault_sel_t'($urandom_range(3));
      faultIn3 <= fault_sel_t'($urandom_range(3));
      fault_mode1 <= fault_mode_e'($urandom_range(1, 3));
      fault_mode2 <= fault_mode_e'($urandom_range(1, 3));
      fault_mode3 <= FM_NONE;
      check_cycle();
    end
    for (int k = 0; k < 3; k++) begin
      $display("copy %0d: faults that corrupted it and were masked: %0d", k + 1, masked[k]);
      checks++;
      if (masked[k] == 0) begin
        failures++;
        $display("copy %0d was never corrupted", k + 1);
      end
    end
    $display("fault-free patterns: %0d, patterns flagged by cmp: %0d, clock cycles: %0d",
             fault_free, flagged, cycles);
    checks += 2;
    if (fault_free == 0) failures++;
    if (flagged == 0) begin
      failures++;
      $display("cmp never flagged a double fault");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
