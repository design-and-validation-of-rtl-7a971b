// tsv_model: behavioural model of one TSV (not synthesizable).
//
// A TSV is a vertical copper via; its defects act on the analog waveform,
// so this model only reproduces, at logic level, when the far end t2 of the
// via crosses the logic threshold after the near end t1 switches. The
// transition times are the characterised 20%-to-80% delays of a 5 um TSV
// driven by a 65 nm gate at 1.2 V:
//  * defect-free: rising 242 ps, falling 160 ps;
//  * void or delamination (DEF_OPEN, series resistance r_ohm): delays are
//    interpolated linearly between the characterised points
//      R      0    1k   2k   3k   4k   5k   10k   50k   100k
//      rise  242  311  419  541  667  805  1492  7085  14121 ps
//      fall  160  225  339  469  608  743  1441  7033  14030 ps
//    and at 1 MOhm or more the TSV is fully open: t2 never changes again;
//  * short to substrate (DEF_SHORT, shunt resistance r_ohm): rising delay
//      R      1k   2k   3k   4k   5k   10k  100k  1M
//      rise  758  665  551  379  336  279  245   242 ps
//    (1 MOhm and above as defect-free), and at 900 Ohm or less the far end
//    stays below half the supply, so it reads as a constant '0'. Falling
//    edges keep the defect-free delay (the leak only helps discharge).
// Each transition is delivered after its own delay (transport delay).
// Ports: t1 (near end, die 1) and t2 (far end, die 2) are the real part's
// terminals; defect is a fault-injection input of the model only. The model
// is for simulation; a synthesis tool that ignores its delays reads it as a
// latch, which is why it has no place in a netlist. The delay
// points come from the characterisation of the technique; the linear
// interpolation and the treatment of falling edges are choices of this model.
module tsv_model (
  input  logic                    t1,
  input  tsv_ft_pkg::tsv_defect_t defect,
  output logic                    t2
);

  timeunit 1ps;
  timeprecision 1ps;

  import tsv_ft_pkg::*;

  localparam int NO = 9;
  localparam longint OPEN_R    [NO] = '{0, 1000, 2000, 3000, 4000, 5000, 10000, 50000, 100000};
  localparam longint OPEN_RISE [NO] = '{242, 311, 419, 541, 667, 805, 1492, 7085, 14121};
  localparam longint OPEN_FALL [NO] = '{160, 225, 339, 469, 608, 743, 1441, 7033, 14030};
  localparam int NS = 8;
  localparam longint SHORT_R    [NS] = '{1000, 2000, 3000, 4000, 5000, 10000, 100000, 1000000};
  localparam longint SHORT_RISE [NS] = '{758, 665, 551, 379, 336, 279, 245, 242};

  localparam longint OPEN_FULL_OHM   = 1000000;
  localparam longint SHORT_STUCK_OHM = 900;

  // piecewise-linear interpolation over a table, clamped at its ends
  function automatic longint interp_open(input longint r, input bit rising);
    longint y0, y1;
    if (r >= 100000) return rising ? OPEN_RISE[NO-1] * r / 100000 : OPEN_FALL[NO-1] * r / 100000;
    for (int i = 0; i < NO - 1; i++) begin
      if (r >= OPEN_R[i] && r < OPEN_R[i+1]) begin
        y0 = rising ? OPEN_RISE[i]   : OPEN_FALL[i];
        y1 = rising ? OPEN_RISE[i+1] : OPEN_FALL[i+1];
        return y0 + (y1 - y0) * (r - OPEN_R[i]) / (OPEN_R[i+1] - OPEN_R[i]);
      end
    end
    return rising ? OPEN_RISE[0] : OPEN_FALL[0];
  endfunction

  function automatic longint interp_short(input longint r);
    if (r <= SHORT_R[0])    return SHORT_RISE[0];
    if (r >= SHORT_R[NS-1]) return SHORT_RISE[NS-1];
    for (int i = 0; i < NS - 1; i++) begin
      if (r >= SHORT_R[i] && r < SHORT_R[i+1])
        return SHORT_RISE[i] + (SHORT_RISE[i+1] - SHORT_RISE[i]) * (r - SHORT_R[i])
               / (SHORT_R[i+1] - SHORT_R[i]);
    end
    return SHORT_RISE[NS-1];
  endfunction

  longint r;
  logic   target;
  longint delay_ps;
  bit     frozen;

  initial t2 = 1'b0;

  always @(t1 or defect) begin
    r        = longint'(defect.r_ohm);
    frozen   = (defect.kind == DEF_OPEN) && (r >= OPEN_FULL_OHM);
    target   = t1 && !((defect.kind == DEF_SHORT) && (r <= SHORT_STUCK_OHM));
    unique case (defect.kind)
      DEF_OPEN:  delay_ps = interp_open(r, target);
      DEF_SHORT: delay_ps = target ? interp_short(r) : longint'(OPEN_FALL[0]);
      default:   delay_ps = target ? longint'(OPEN_RISE[0]) : longint'(OPEN_FALL[0]);
    endcase
    if (!frozen) t2 <= #(delay_ps * 1ps) target;
  end

endmodule
