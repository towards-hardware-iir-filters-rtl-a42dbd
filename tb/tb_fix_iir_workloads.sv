// tb_fix_iir_workloads: last-bit accuracy of the filter on the two families
// of 12-bit band-pass filters it is meant for, at their extreme points
// and in the middle of the first family.
//
//   ex1_k0    Butterworth, passband [0.45, 0.55], stopbands [0, 0.43] and
//             [0.57, 1] (narrowest transition band): order 18 here, the most
//             sensitive filter of the family, with 18 extra feedback bits;
//   ex1_k22   Butterworth, same passband, stopbands [0, 0.21] and [0.79, 1]
//             (widest transition band): order 4, 4 extra bits;
//   ex2_p05   elliptic, passband [0.05, 0.06], 1 dB / 20 dB: order 4;
//   ex2_p97   elliptic, passband [0.97, 0.98]: order 4, 20 extra bits;
//   ex1_k11   Butterworth, stopbands [0, 0.32] and [0.68, 1] (middle of the
//             sweep): order 6, 6 extra bits.
// Coefficients were designed with standard Butterworth and elliptic routines,
// and the formats follow MSB_OUT = ceil(log2(<<H>> + 2^-13)) and
// LSB_EXT = -13 - ceil(log2 <<H_eps>>) with peak gains from long truncated
// impulse responses. The (order 4) default filter, passband [0.50, 0.51],
// is covered by tb_fix_iir_dfi. Each configuration runs in its own iir_bench.
// The exact zero and near-zero coefficients of the Butterworth filters
// exercise the multiplier's zero case and its neglected tables.
module tb_fix_iir_workloads;

  localparam real B1 [19] = '{4.6264715245537576e-08, 0.0, -4.163824372098382e-07, 0.0,
    1.6655297488393528e-06, 0.0, -3.886236080625157e-06, 0.0, 5.829354120937735e-06, 0.0,
    -5.829354120937735e-06, 0.0, 3.886236080625157e-06, 0.0, -1.6655297488393528e-06, 0.0,
    4.163824372098382e-07, 0.0, -4.6264715245537576e-08};
  localparam real A1 [18] = '{-3.635980405647388e-15, 7.053128584226654, -2.2093438190040615e-14,
    22.281832075423512, -5.928590951498336e-14, 41.35369803686304, -1.1057821325266559e-13,
    49.66215842141945, -1.092459456231154e-13, 40.000995187899335, -5.950795411990839e-14,
    21.60081194145668, -2.3314683517128287e-14, 7.538271742701066, -5.662137425588298e-15,
    1.5421947562744907, -6.245004513516506e-16, 0.140879955349824};
  localparam real B2 [5] = '{0.036161432270215246, 0.0, -0.07232286454043049, 0.0,
    0.036161432270215246};
  localparam real A2 [4] = '{-5.551115123125783e-16, 1.39470353252375, -3.3306690738754696e-16,
    0.5393492616046109};
  localparam real B3 [5] = '{0.09863033129198474, -0.3877113006628177, 0.5782477768578048,
    -0.3877113006628177, 0.09863033129198479};
  localparam real A3 [4] = '{-3.908466612725735, 5.786908007542338, -3.8457594005306124,
    0.9681763868753991};
  localparam real B4 [5] = '{0.09863033129198473, 0.3923586000588247, 0.5874599846443848,
    0.39235860005882467, 0.0986303312919847};
  localparam real A4 [4] = '{3.9553154265147112, 5.879030085408137, 3.891856574661777,
    0.9681763868753988};
  localparam real B5 [7] = '{0.005264059293562921, 0.0, -0.015792177880688762, 0.0,
    0.015792177880688762, 0.0, -0.005264059293562921};
  localparam real A5 [6] = '{-7.216449660063518e-16, 2.2211509953931645, -1.2212453270876722e-15,
    1.7177433438928007, -4.440892098500626e-16, 0.4544798741511326};

  int c1, f1, e1, c2, f2, e2, c3, f3, e3, c4, f4, e4, c5, f5, e5;
  bit d1, d2, d3, d4, d5;

  iir_bench #(.NAME("ex1_k0"), .NB(18), .NA(18), .B(B1), .A(A1),
              .MSB_OUT(1), .LSB_EXT(-30), .N_RAND(3000), .K_WC(3000))
    u_ex1_k0 (.checks(c1), .failures(f1), .max_err_ulp_x1000(e1), .done(d1));
  iir_bench #(.NAME("ex1_k22"), .NB(4), .NA(4), .B(B2), .A(A2),
              .MSB_OUT(1), .LSB_EXT(-16), .N_RAND(3000), .K_WC(1000))
    u_ex1_k22 (.checks(c2), .failures(f2), .max_err_ulp_x1000(e2), .done(d2));
  iir_bench #(.NAME("ex2_p05"), .NB(4), .NA(4), .B(B3), .A(A3),
              .MSB_OUT(1), .LSB_EXT(-29), .N_RAND(3000), .K_WC(3000))
    u_ex2_p05 (.checks(c3), .failures(f3), .max_err_ulp_x1000(e3), .done(d3));
  iir_bench #(.NAME("ex2_p97"), .NB(4), .NA(4), .B(B4), .A(A4),
              .MSB_OUT(1), .LSB_EXT(-32), .N_RAND(3000), .K_WC(3000))
    u_ex2_p97 (.checks(c4), .failures(f4), .max_err_ulp_x1000(e4), .done(d4));
  iir_bench #(.NAME("ex1_k11"), .NB(6), .NA(6), .B(B5), .A(A5),
              .MSB_OUT(1), .LSB_EXT(-18), .N_RAND(3000), .K_WC(1000))
    u_ex1_k11 (.checks(c5), .failures(f5), .max_err_ulp_x1000(e5), .done(d5));

  initial begin
    #10_000_000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3 + c4 + c5, f1 + f2 + f3 + f4 + f5 + 1);
    $finish;
  end

  initial begin
    wait (d1 && d2 && d3 && d4 && d5);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3 + c4 + c5, f1 + f2 + f3 + f4 + f5);
    $finish;
  end

endmodule
