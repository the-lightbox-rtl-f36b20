// Testbench for light_pattern: the step-by-step light patterns, cues and
// lengths of representative sequences of every family, written out as the
// hex patterns the sequences are meant to show, plus the direct sequences
// for random band values and the random-pattern generators. A sweep over
// all 100 numbers checks each one's cue and length against the family
// table, and that 50-99 are the inverses of 00-49, except 60-69, which must
// show chases 10-19 in mirror order (step t of the left chase equals step
// -t mod 8 of the right one).
module tb_light_pattern;
  import lightbox_pkg::*;
  logic [7:0] pnum, rnd, ch, lights, rnd_next;
  logic [4:0] step;
  logic [8:0] hist, r, hist_next;
  logic [5:0] len;
  logic rest;
  cue_e cue;
  int checks = 0, failures = 0;

  light_pattern dut (.pnum(pnum), .step(step), .rnd(rnd), .hist(hist), .r(r), .ch(ch),
                     .lights(lights), .cue(cue), .len(len), .rest(rest),
                     .rnd_next(rnd_next), .hist_next(hist_next));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] bcd(int n);
    return {4'(n / 10), 4'(n % 10)};
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Walk a stepped sequence and compare every step.
  task automatic seq(int n, cue_e c, logic [7:0] pats [$]);
    pnum = bcd(n); rnd = '0; hist = '0; r = '0; ch = '0;
    for (int s = 0; s < pats.size(); s++) begin
      step = 5'(s);
      #1;
      check(lights == pats[s], $sformatf("seq %02d step %0d: %h exp %h", n, s, lights, pats[s]));
    end
    check(cue == c, $sformatf("seq %02d cue %s exp %s", n, cue.name(), c.name()));
    check(int'(len) == pats.size(), $sformatf("seq %02d len %0d exp %0d", n, len, pats.size()));
  endtask

  initial begin
    // centre pair out / in / bounce / bounce with pauses
    seq(1,  CUE_RISE5, '{8'h18, 8'h24, 8'h42, 8'h81});
    seq(2,  CUE_RISE5, '{8'h81, 8'h42, 8'h24, 8'h18});
    seq(3,  CUE_RISE5, '{8'h81, 8'h42, 8'h24, 8'h18, 8'h24, 8'h42});
    seq(4,  CUE_RISE5, '{8'h81, 8'h42, 8'h24, 8'h18, 8'h18, 8'h24, 8'h42, 8'h81});
    // explode
    seq(5,  CUE_TIMED, '{8'h18, 8'h3C, 8'h7E, 8'hFF, 8'hFF, 8'h7E, 8'h3C});
    seq(9,  CUE_TIMED, '{8'h01, 8'h03, 8'h07, 8'h0F, 8'h1F, 8'h3F, 8'h7F, 8'hFF,
                         8'h7F, 8'h3F, 8'h1F, 8'h0F, 8'h07, 8'h03});
    // chases right, and their left-running counterparts
    seq(10, CUE_RISE5, '{8'h80, 8'h40, 8'h20, 8'h10, 8'h08, 8'h04, 8'h02, 8'h01});
    seq(12, CUE_RISE5, '{8'hC0, 8'h60, 8'h30, 8'h18, 8'h0C, 8'h06, 8'h03, 8'h81});
    seq(15, CUE_RISE5, '{8'hEE, 8'h77, 8'hBB, 8'hDD, 8'hEE, 8'h77, 8'hBB, 8'hDD});
    seq(16, CUE_RISE5, '{8'hF0, 8'h78, 8'h3C, 8'h1E, 8'h0F, 8'h87, 8'hC3, 8'hE1});
    seq(19, CUE_RISE5, '{8'hFE, 8'h7F, 8'hBF, 8'hDF, 8'hEF, 8'hF7, 8'hFB, 8'hFD});
    seq(60, CUE_RISE5, '{8'h80, 8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40});
    seq(65, CUE_RISE5, '{8'hEE, 8'hDD, 8'hBB, 8'h77, 8'hEE, 8'hDD, 8'hBB, 8'h77});
    // inverted
    seq(51, CUE_RISE5, '{8'hE7, 8'hDB, 8'hBD, 8'h7E});
    // either-or
    seq(30, CUE_BOTH5, '{8'h00, 8'hFF});
    seq(80, CUE_BOTH5, '{8'hFF, 8'h00});
    seq(31, CUE_RISE5, '{8'h00, 8'hFF});
    seq(32, CUE_BOTH5, '{8'h00, 8'h0F, 8'h00, 8'hF0});
    seq(36, CUE_RISE5, '{8'h55, 8'hAA});
    seq(86, CUE_RISE5, '{8'hAA, 8'h55});
    // multi-paced chases
    seq(37, CUE_RISE5, '{8'h0E, 8'h54, 8'h4A, 8'h11, 8'hA4, 8'h54, 8'hE0, 8'h01});
    seq(38, CUE_RISE5, '{8'h06, 8'h14, 8'h48, 8'h11, 8'h24, 8'h50, 8'hC0, 8'h01});
    seq(39, CUE_RISE5, '{8'h1E, 8'h55, 8'h5A, 8'h11, 8'hB4, 8'h55, 8'hF0, 8'h01});
    seq(40, CUE_RISE5, '{8'h3E, 8'h55, 8'hDA, 8'h11, 8'hB6, 8'h55, 8'hF8, 8'h01});
    seq(43, CUE_RISE5, '{8'hFF, 8'h55, 8'hFF, 8'h11, 8'hFF, 8'h55, 8'hFF, 8'h01});
    seq(44, CUE_RISE2, '{8'h06, 8'h14, 8'h48, 8'h11, 8'h24, 8'h50, 8'hC0, 8'h01});
    seq(49, CUE_RISE2, '{8'hFF, 8'h55, 8'hFF, 8'h11, 8'hFF, 8'h55, 8'hFF, 8'h01});
    seq(90, CUE_RISE5, '{8'hC1, 8'hAA, 8'h25, 8'hEE, 8'h49, 8'hAA, 8'h07, 8'hFE});

    // rest steps of the explode sequences
    pnum = bcd(8); step = 0; #1; check(rest && cue == CUE_TIMED, "08 rest at 0");
    step = 16; #1; check(rest, "08 rest at 16");
    step = 5; #1; check(!rest && lights == 8'hF8, "08 step 5");
    step = 20; #1; check(lights == 8'h0F, "08 step 20");

    // direct sequences
    for (int i = 0; i < 50; i++) begin
      ch = 8'($urandom); step = 5'($urandom);
      pnum = bcd(0);  #1; check(lights == ch && cue == CUE_DIRECT, "00 direct");
      pnum = bcd(50); #1; check(lights == ~ch, "50 inverted direct");
      pnum = bcd(33); #1;
      check(lights == {ch[7], ch[5], ch[3], ch[1], ch[0], ch[2], ch[4], ch[6]}, "33 shuffle");
      pnum = bcd(83); #1;
      check(lights == ~{ch[7], ch[5], ch[3], ch[1], ch[0], ch[2], ch[4], ch[6]}, "83 shuffle");
      pnum = bcd(34); #1; check(lights == {8{ch[2]}}, "34 band 2");
      pnum = bcd(35); #1; check(lights == {8{ch[3]}}, "35 band 3");
    end

    // random generators
    step = 0;
    for (int i = 0; i < 100; i++) begin
      r = 9'($urandom); rnd = 8'($urandom); hist = 9'($urandom);
      pnum = bcd(20); #1;
      check(rnd_next == 8'(1 << r[2:0]) && lights == rnd, "20 one random light");
      pnum = bcd(70); #1; check(lights == ~rnd, "70 inverted");
      pnum = bcd(22); #1;
      check(rnd_next == (8'(1 << r[2:0]) | 8'(1 << r[5:3]) | 8'(1 << r[8:6])), "22 three lights");
      pnum = bcd(23); #1; check(rnd_next == 8'(3 << (2 * r[1:0])), "23 aligned pair");
      pnum = bcd(24); #1;
      check(rnd_next == (r[0] ? 8'hF0 : 8'h0F) && cue == CUE_BOTH5, "24 half");
      pnum = bcd(25); #1;
      check(hist_next == {hist[5:0], r[2:0]} &&
            lights == (8'(1 << hist[2:0]) | 8'(1 << hist[5:3])), "25 history of 2");
      pnum = bcd(26); #1;
      check(lights == (8'(1 << hist[2:0]) | 8'(1 << hist[5:3]) | 8'(1 << hist[8:6])), "26 history of 3");
      pnum = bcd(27); #1;
      check(cue == CUE_RISE321 && $countones(rnd_next) == 2 &&
            rnd_next[r[2:0]] && rnd_next[3'(r[2:0] + 1)], "27 adjacent pair");
      pnum = bcd(29); #1;
      check(cue == CUE_SLOW && rnd_next[r[2:0]] && rnd_next[3'(r[2:0] + 2)], "29 group of three");
    end

    // the remaining explode tables
    seq(6,  CUE_TIMED, '{8'h00, 8'h18, 8'h3C, 8'h7E, 8'hFF, 8'hFF, 8'h7E, 8'h3C, 8'h18});
    seq(7,  CUE_TIMED, '{8'h80, 8'hC0, 8'hE0, 8'hF0, 8'hF8, 8'hFC, 8'hFE, 8'hFF,
                         8'h7E, 8'h3C, 8'h18, 8'h00});
    seq(8,  CUE_TIMED, '{8'h00, 8'h80, 8'hC0, 8'hE0, 8'hF0, 8'hF8, 8'hFC, 8'hFE,
                         8'hFF, 8'hFE, 8'hFC, 8'hF8, 8'hF0, 8'hE0, 8'hC0, 8'h80,
                         8'h00, 8'h01, 8'h03, 8'h07, 8'h0F, 8'h1F, 8'h3F, 8'h7F,
                         8'hFF, 8'h7F, 8'h3F, 8'h1F, 8'h0F, 8'h07, 8'h03, 8'h01});

    // every number 00-99: cue and length by family, and the upper half as the
    // inverse (or, for 60-69, the mirror-image chase) of the lower half
    for (int n = 0; n < 100; n++) begin
      int b;
      cue_e ec;
      int el;
      logic [7:0] lo_l [32];
      b = n % 50;
      el = 1;
      if (b == 0 || (b >= 33 && b <= 35))      ec = CUE_DIRECT;
      else if (b >= 5 && b <= 9)               ec = CUE_TIMED;
      else if (b == 24 || b == 30 || b == 32)  ec = CUE_BOTH5;
      else if (b == 27 || b == 28)             ec = CUE_RISE321;
      else if (b == 29)                        ec = CUE_SLOW;
      else if (b >= 44)                        ec = CUE_RISE2;
      else                                     ec = CUE_RISE5;
      case (b)
        1, 2: el = 4;   3: el = 6;   4: el = 8;   5: el = 7;   6: el = 9;
        7: el = 12;     8: el = 32;  9: el = 14;
        24, 30, 31, 36: el = 2;      32: el = 4;
        default: if ((b >= 10 && b <= 19) || b >= 37) el = 8;
      endcase
      ch = 8'($urandom); rnd = 8'($urandom); hist = 9'($urandom); r = 9'($urandom);
      pnum = bcd(n); step = 0; #1;
      check(cue == ec, $sformatf("seq %02d cue %s exp %s", n, cue.name(), ec.name()));
      if (ec != CUE_DIRECT)
        check(int'(len) == el, $sformatf("seq %02d len %0d exp %0d", n, len, el));
      if (n >= 50) begin
        pnum = bcd(b);
        for (int st = 0; st < 32; st++) begin step = 5'(st); #1; lo_l[st] = lights; end
        pnum = bcd(n);
        for (int st = 0; st < 32; st++) begin
          step = 5'(st); #1;
          if (b >= 10 && b <= 19)
            check(lights == lo_l[(8 - st % 8) % 8],
                  $sformatf("seq %02d step %0d mirrors %02d", n, st, b));
          else
            check(lights == ~lo_l[st], $sformatf("seq %02d step %0d inverts %02d", n, st, b));
        end
      end
    end

    // codes that are not BCD digits keep the lights dark
    pnum = 8'hA5; step = 0; ch = 8'hFF; #1;
    check(lights == 8'h00 && cue == CUE_DIRECT, "non-BCD number dark");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
