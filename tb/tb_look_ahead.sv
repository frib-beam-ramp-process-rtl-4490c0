// tb_look_ahead: self-checking test of look_ahead. Includes the two cases
// of the lab test (120 us left with a 40 us cycle: extend; 80 us left:
// shrink) and random points; the decision and the four bounds are
// compared with a reference written from the decision rules.
module tb_look_ahead;
  import ramp_pkg::*;
  logic [31:0] left, notch, cyc_step, tol_w, pw_start, cmax, cmin, pwmax1, pwmax2, pwmin;
  la_e la;
  logic [31:0] tc_max, tc_min, tw_max, tw_min;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  look_ahead dut (.left, .notch, .cyc_step, .tol_w, .pw_start, .cmax, .cmin, .pwmax1,
                  .pwmax2, .pwmin, .la, .tc_max, .tc_min, .tw_max, .tw_min);

  function automatic longint clip(input longint v);
    return v < 0 ? 0 : v;
  endfunction

  task automatic chk();
    longint av, e_tcmax, e_tcmin, e_twmax, e_twmin;
    la_e e_la;
    #1;
    av = clip(longint'(left) - longint'(notch));
    if (av >= 2 * longint'(cmax)) begin
      e_la = LA_MAINTAIN; e_tcmax = cmax + cyc_step; e_tcmin = clip(longint'(cmin) - cyc_step);
      e_twmax = pwmax1 + tol_w; e_twmin = clip(longint'(pwmin) - tol_w);
    end else if (av >= longint'(cmax)) begin
      e_la = LA_EXTEND; e_tcmax = left + cyc_step; e_tcmin = clip(longint'(cmin) - cyc_step);
      e_twmax = pwmax2 + tol_w; e_twmin = clip(longint'(pwmin) - tol_w);
    end else begin
      e_la = LA_SHRINK;
      e_tcmax = ((left > cmax) ? left : cmax) + cyc_step;
      e_tcmin = clip(longint'((left < cmin) ? left : cmin) - cyc_step);
      e_twmax = pwmax1 + tol_w; e_twmin = clip(longint'(pw_start) - tol_w);
    end
    seen[e_la]++;
    checks++;
    if (la !== e_la || tc_max !== 32'(e_tcmax) || tc_min !== 32'(e_tcmin) ||
        tw_max !== 32'(e_twmax) || tw_min !== 32'(e_twmin)) begin
      failures++;
      $display("FAIL left=%0d cmax=%0d la=%0d/%0d tc=%0d..%0d (%0d..%0d) tw=%0d..%0d (%0d..%0d)",
               left, cmax, la, e_la, tc_min, tc_max, e_tcmin, e_tcmax, tw_min, tw_max, e_twmin, e_twmax);
    end
  endtask

  initial begin
    notch = 4025; cyc_step = 400; tol_w = 10; pw_start = 49;
    cmax = 3220; cmin = 3200; pwmax1 = 3200; pwmin = 3140; pwmax2 = 9600;
    left = 9660; chk();                      // 120 us left: extend to the MC end
    checks++; if (la !== LA_EXTEND) failures++;
    left = 6440; chk();                      // 80 us left: PW cut back to start PW
    checks++; if (la !== LA_SHRINK || tw_min !== 39) failures++;
    left = 805000 - 4025; chk();             // early in the MC: maintain
    checks++; if (la !== LA_MAINTAIN) failures++;
    for (int i = 0; i < 2000; i++) begin
      cmax = $urandom_range(3000, 50000); cmin = cmax - $urandom_range(0, 2000);
      pwmax1 = $urandom_range(40, 4000); pwmin = pwmax1 - $urandom_range(0, 40);
      pwmax2 = pwmax1 * 3; left = $urandom_range(0, 150000);
      cyc_step = $urandom_range(0, 5000);
      chk();
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
