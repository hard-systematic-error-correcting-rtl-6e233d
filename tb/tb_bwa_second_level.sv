// tb_bwa_second_level: drives the second level (33 tag bits, 7 parity bits,
// P_MAX = 2) with sparse random first-level output patterns and flags.
// Expected behaviour, with slot weights recomputed here:
//   * or_flag = any input slot of weight > 2, or either first-level flag;
//   * with no second-level flag, the weighted sum of the second-level
//     outputs equals the weighted sum of the input slots of weight 1 and 2;
//   * a second-level flag is set only if that sum is at least 4, and is
//     never set when the sum is below 4.
module tb_bwa_second_level;
  localparam int KT = 33, KP = 7, PMAX = 2;
  localparam int ST = 6, SP = 3, NT = 64, NP = 8;

  function automatic int wt(int s, int p);
    int w = 1;
    for (int b = 0; b < s; b++) if (((p >> b) & 1) == 0) w *= 2;
    return w;
  endfunction

  // Second-level classes and widths, recomputed from the slot weights.
  function automatic int cnt_class(int w);
    int c = 0;
    for (int p = 0; p < NT; p++) if (wt(ST, p) == w) c++;
    for (int p = 0; p < NP; p++) if (wt(SP, p) == w) c++;
    return c;
  endfunction
  function automatic int clog2i(int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  localparam int C  = 2;  // weights 1 and 2
  localparam int M2 = 16; // 9 weight-2 slots (6 tag + 3 parity) -> 16-wide BWA

  logic [NT-1:0]   tag_cnt;
  logic [NP-1:0]   par_cnt;
  logic            tag_sat, par_sat, or_flag;
  logic [C*M2-1:0] l2_bits;
  logic [C-1:0]    l2_sat;
  int checks = 0, failures = 0;
  int seen_or = 0, seen_sat = 0, seen_exact = 0;

  bwa_second_level #(.KT(KT), .KP(KP), .P_MAX(PMAX)) dut (
    .tag_cnt(tag_cnt), .tag_sat(tag_sat), .par_cnt(par_cnt), .par_sat(par_sat),
    .or_flag(or_flag), .l2_bits(l2_bits), .l2_sat(l2_sat));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(cnt_class(1) == 2 && cnt_class(2) == 9, "class sizes");
    for (int n = 0; n < 20000; n++) begin
      int light, outsum, heavy;
      tag_cnt = '0; par_cnt = '0;
      for (int k = 0; k < int'($urandom % 4); k++) begin
        if ($urandom % 2) tag_cnt[$urandom % NT] = 1'b1;
        else              par_cnt[$urandom % NP] = 1'b1;
      end
      tag_sat = ($urandom % 16) == 0;
      par_sat = ($urandom % 16) == 0;
      #1;
      light = 0; heavy = 0;
      for (int p = 0; p < NT; p++) if (tag_cnt[p]) begin
        if (wt(ST, p) > PMAX) heavy = 1; else light += wt(ST, p);
      end
      for (int p = 0; p < NP; p++) if (par_cnt[p]) begin
        if (wt(SP, p) > PMAX) heavy = 1; else light += wt(SP, p);
      end
      outsum = 0;
      for (int c = 0; c < C; c++) begin
        int s;
        s = clog2i(cnt_class(1 << c));
        for (int p = 0; p < (1 << s); p++)
          if (l2_bits[c*M2 + p]) outsum += (1 << c) * wt(s, p);
        for (int p = (1 << s); p < M2; p++)
          check(!l2_bits[c*M2 + p], $sformatf("padding slot is 0 c=%0d p=%0d bits=%h t=%h p=%h", c, p, l2_bits, tag_cnt, par_cnt));
      end
      check(or_flag == (heavy || tag_sat || par_sat), "or_flag");
      if (l2_sat == '0) check(outsum == light, $sformatf("sum %0d vs %0d", outsum, light));
      else              check(light >= 4, "second-level flag with small sum");
      if (light < 4) check(l2_sat == '0, "no flag below 4");
      if (or_flag) seen_or++;
      if (l2_sat != '0) seen_sat++;
      if (l2_sat == '0 && !or_flag) seen_exact++;
    end
    check(seen_or > 0 && seen_sat > 0 && seen_exact > 0, "all paths exercised");
    $display("or_flag=%0d l2_sat=%0d exact=%0d", seen_or, seen_sat, seen_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
