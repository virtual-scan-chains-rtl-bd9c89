// Workload testbench: the virtual scan chain built in each of the fifteen
// configurations of the evaluation table (five ISCAS 89 circuits, each with
// 4, 8 and 16 sub-chains). For each, p and q are derived from the table's
// real scan length m and virtual scan length v as
//   q = (m - v + log2(n)) / (n - 1),   p = m - n*q,
// and a vsc_cfg_check instance checks that the built chain has exactly those
// lengths, loads a few random virtual vectors, compares every expanded
// vector and the SDO stream with its references, and flushes.
// The circuits' own logic is not modeled; a fixed function stands in for it.
module tb_vsc_table1;
  // circuit, m, n, v from the table
  localparam int unsigned NCFG = 15;
  localparam int unsigned TM[NCFG] = '{247, 247, 247, 700, 700, 700, 611, 611, 611,
                                       1664, 1664, 1664, 1464, 1464, 1464};
  localparam int unsigned TN[NCFG] = '{4, 8, 16, 4, 8, 16, 4, 8, 16, 4, 8, 16, 4, 8, 16};
  localparam int unsigned TV[NCFG] = '{126, 124, 131, 264, 199, 194, 235, 208, 210,
                                       652, 547, 573, 605, 452, 343};

  bit done[NCFG];
  int c[NCFG], f[NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned LOGN = $clog2(TN[g]);
    localparam int unsigned QQ = (TM[g] - TV[g] + LOGN) / (TN[g] - 1);
    localparam int unsigned PP = TM[g] - TN[g] * QQ;
    vsc_cfg_check #(.P(PP), .Q(QQ), .N(TN[g]), .M_TABLE(TM[g]), .V_TABLE(TV[g]))
      u_chk (.done(done[g]), .checks(c[g]), .failures(f[g]));
  end

  int checks, failures;

  initial begin
    #5ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      #100;
      all_done = 1;
      for (int i = 0; i < NCFG; i++) all_done &= done[i];
    end while (!all_done);
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      $display("config m=%0d n=%0d v=%0d: checks=%0d failures=%0d", TM[i], TN[i], TV[i], c[i], f[i]);
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
