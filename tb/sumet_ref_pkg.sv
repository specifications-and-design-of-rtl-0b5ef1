// sumet_ref_pkg: behavioural reference of the SUMET arithmetic for the
// testbenches. It works from the wedge geometry, not from the RTL's adder
// structure: wedge (sector s, parity j) sits at an azimuth taken from the
// wedge map (first quadrant 30s + 7.5 + 15j degrees, the other quadrants
// mirrored), cos/sin signs come from that angle, and each group of four
// wedges sharing |cos| or |sin| is weighted by a look-up value rounded to
// 0.25 GeV as the phi-weighting SRAMs hold it.
package sumet_ref_pkg;

  localparam real PI = 3.14159265358979;

  function automatic real angle_deg(input int s, input int j);
    if (s <= 2)      return 30.0 * s + 7.5 + 15.0 * j;
    else if (s <= 5) return 180.0 - (30.0 * (5 - s) + 7.5 + 15.0 * j);
    else if (s <= 8) return 180.0 + (30.0 * (s - 6) + 7.5 + 15.0 * j);
    else             return 360.0 - (30.0 * (11 - s) + 7.5 + 15.0 * j);
  endfunction

  // Canonical factor: cos of a first-quadrant angle given in degrees.
  function automatic real cosd(input real d);
    return $cos(d * PI / 180.0);
  endfunction

  // Factor held by LUT k (LUT_0..5): cos 7.5, 37.5, 67.5, 82.5, 52.5, 22.5.
  function automatic real lut_weight(input int k);
    case (k)
      0: return cosd(7.5);
      1: return cosd(37.5);
      2: return cosd(67.5);
      3: return cosd(82.5);
      4: return cosd(52.5);
      default: return cosd(22.5);
    endcase
  endfunction

  // Signed product in 0.25 GeV of a 0.5 GeV signed value and a factor,
  // rounded to nearest and limited to 2047.
  function automatic int weigh(input int v, input real w);
    real p;
    int  q;
    p = 2.0 * v * w;
    q = (p >= 0.0) ? int'($floor(p + 0.5)) : -int'($floor(-p + 0.5));
    if (q > 2047) q = 2047;
    if (q < -2047) q = -2047;
    return q;
  endfunction

  // SRAM word for LUT k at a 12-bit two's complement address.
  function automatic logic [15:0] lut_word(input int k, input logic [11:0] a);
    int q;
    q = weigh(int'($signed(a)), lut_weight(k));
    return {4'h0, (q < 0), 11'((q < 0) ? -q : q)};
  endfunction

  typedef struct {
    logic [10:0] sumet;
    logic [9:0]  sumex;
    logic [9:0]  sumey;
    logic [15:0] metsq;
    logic        et_ovf;
    logic        met_ovf;
  } result_t;

  // et[s][j]: wedge E_t (10 bits, 0.5 GeV) of sector s, parity j.
  function automatic result_t sumet(input logic [9:0] et [12][2]);
    result_t r;
    int tot, sx, sy, ax, ay, mx, my, v;
    bit sat, ox, oy;
    tot = 0; sx = 0; sy = 0; sat = 0;
    for (int s = 0; s < 12; s++)
      for (int j = 0; j < 2; j++) begin
        tot += et[s][j];
        if (et[s][j] == 10'h3FF) sat = 1;
      end
    // group g: sectors whose wedge angles fold onto sector g's
    for (int g = 0; g < 3; g++)
      for (int j = 0; j < 2; j++) begin
        int px, py;
        real th;
        px = 0; py = 0;
        for (int s = 0; s < 12; s++) begin
          int fold;
          fold = (s <= 2) ? s : (s <= 5) ? 5 - s : (s <= 8) ? s - 6 : 11 - s;
          if (fold == g) begin
            th = angle_deg(s, j) * PI / 180.0;
            px += ($cos(th) > 0.0) ? int'(et[s][j]) : -int'(et[s][j]);
            py += ($sin(th) > 0.0) ? int'(et[s][j]) : -int'(et[s][j]);
          end
        end
        th = 30.0 * g + 7.5 + 15.0 * j;   // first-quadrant angle
        sx += weigh(px, cosd(th));
        sy += weigh(py, cosd(90.0 - th));
      end
    ax = (sx < 0) ? -sx : sx;
    ay = (sy < 0) ? -sy : sy;
    ox = sat || ax >= 1024;
    oy = sat || ay >= 1024;
    r.et_ovf = sat || tot >= 4096;
    r.sumet  = r.et_ovf ? 11'h7FF : 11'(tot >> 1);
    r.sumex  = ox ? 10'h3FF : {sx < 0, 9'(ax >> 1)};
    r.sumey  = oy ? 10'h3FF : {sy < 0, 9'(ay >> 1)};
    mx = ox ? 511 : (ax >> 1);
    my = oy ? 511 : (ay >> 1);
    v  = (mx * mx + my * my) >> 2;
    r.met_ovf = ox || oy || v >= 65536;
    r.metsq   = r.met_ovf ? 16'hFFFF : 16'(v);
    return r;
  endfunction

endpackage
