// mvc_voter_tb: self-checking test of the proposed majority voter.
//
// A 1-bit voter is driven through all eight input combinations and
// compared with the printed truth table (V column), and with a count of
// ones (V = 1 when at least two inputs are 1). A 5-bit voter is then driven
// with random words and checked bit by bit against the same count. The
// voter is combinational: outputs are sampled 1 ns after each change.
module mvc_voter_tb;

  localparam int unsigned W = 5;

  logic t1, t2, t3, v;
  logic [W-1:0] w1, w2, w3, wv;

  int checks = 0;
  int failures = 0;

  // V column of the truth table, indexed by {T3,T2,T1}.
  localparam logic [7:0] TABLE_V = 8'b1110_1000;

  mvc_voter dut1 (.t1(t1), .t2(t2), .t3(t3), .v(v));
  mvc_voter #(.WIDTH(W)) dutw (.t1(w1), .t2(w2), .t3(w3), .v(wv));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w1 = '0; w2 = '0; w3 = '0;
    for (int i = 0; i < 8; i++) begin
      {t3, t2, t1} = 3'(i);
      #1;
      checks++;
      if (v !== TABLE_V[i]) begin
        failures++;
        $display("table mismatch T3T2T1=%03b v=%b expected %b", 3'(i), v, TABLE_V[i]);
      end
      checks++;
      if (v !== ((int'(t1) + int'(t2) + int'(t3)) >= 2)) begin
        failures++;
        $display("majority mismatch T3T2T1=%03b v=%b", 3'(i), v);
      end
    end
    for (int n = 0; n < 200; n++) begin
      w1 = W'($urandom); w2 = W'($urandom); w3 = W'($urandom);
      #1;
      for (int b = 0; b < W; b++) begin
        checks++;
        if (wv[b] !== ((int'(w1[b]) + int'(w2[b]) + int'(w3[b])) >= 2)) begin
          failures++;
          $display("wide mismatch bit %0d: %b %b %b -> %b", b, w1[b], w2[b], w3[b], wv[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
