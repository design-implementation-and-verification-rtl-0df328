// sincos_rom: synchronous 1024 x 26 table of the sine and cosine of the
// electrical angle, used by the ab->dq current transformation.
//
// Entry a holds sin in bits [25:13] and cos in bits [12:0] of the angle
// 2*pi*a/1024 + OFFSET_SIXTHS*60 degrees, each a signed 13-bit number with
// 4095 standing for 1.0, so one table serves phi (OFFSET_SIXTHS = 0) and
// another phi + 60 deg (OFFSET_SIXTHS = 1). The size, the word layout and
// the two angles follow the description; the table is computed at
// elaboration from the integer sine in mac_pkg instead of being loaded from
// an initialisation file.
//
// Timing: one cycle from addr to data (registered read, block-RAM style).
module sincos_rom #(
  parameter int unsigned OFFSET_SIXTHS = 0
) (
  input  logic                       clk,
  input  mac_pkg::angle_t            addr,
  output logic signed [12:0]         sin_q,
  output logic signed [12:0]         cos_q
);
  localparam int N = 1 << mac_pkg::ANG_W;
  typedef logic [25:0] rom_t [N];

  function automatic logic signed [12:0] q13(input longint v);
    // round(4095 * v / 2^30)
    longint t;
    t = v * 4095;
    t = (t >= 0) ? (t + (64'sd1 <<< 29)) >>> 30 : -((-t + (64'sd1 <<< 29)) >>> 30);
    return 13'(t);
  endfunction

  function automatic rom_t gen_rom();
    rom_t r;
    for (int a = 0; a < N; a++) begin
      // angle in units of 1/(6N) of a turn
      longint n;
      n = longint'(a) * 6 + longint'(OFFSET_SIXTHS) * N;
      r[a] = {q13(mac_pkg::isin_q30(n, 6 * N)),
              q13(mac_pkg::isin_q30(n + (6 * N) / 4, 6 * N))};
    end
    return r;
  endfunction

  localparam rom_t ROM = gen_rom();

  logic [25:0] q;
  always_ff @(posedge clk) q <= ROM[addr];
  assign sin_q = q[25:13];
  assign cos_q = q[12:0];
endmodule
