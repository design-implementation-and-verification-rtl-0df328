// quadrature_counter: position and electrical angle from the filtered
// encoder signals.
//
// Every edge of A or B is one count (1024 pulses per turn give 4096 edges,
// 12 bits per mechanical turn); the phase order of A and B gives the
// direction. The INDEX0 pulse marks a fixed rotor position: on its rising
// edge the position is loaded with -ANGLE_OFFSET (385 edges, c_angle_offset),
// so that position zero coincides with the electrical reference of the
// windings. With POLE_PAIRS = 4 one mechanical turn is four electrical
// turns, so the 10 low bits of the 12-bit position are the electrical angle
// phi (1024 steps per electrical turn). A simultaneous change of A and B is
// illegal and raises enc_err for one cycle.
// Counting rule, offset and pole count follow the design description; the
// sign convention (A leading B counts up) and loading the offset at the
// index edge are this design's choices.
//
// Timing: outputs are registered, one cycle after the filtered edge.
// edge_up/edge_dn pulse with each counted edge (used by the speed meter).
module quadrature_counter #(
  parameter int unsigned EDGES        = mac_pkg::ENC_EDGES,
  parameter int unsigned ANGLE_OFFSET = mac_pkg::ANGLE_OFFSET,
  parameter int unsigned POLE_PAIRS   = mac_pkg::POLE_PAIRS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [2:0]               enc,        // filtered {index0, b, a}
  output logic [$clog2(EDGES)-1:0] position,   // mechanical, edges
  output mac_pkg::angle_t          phi,        // electrical angle
  output logic                     edge_up,
  output logic                     edge_dn,
  output logic                     enc_err,
  output logic                     index_seen
);
  localparam int PW = $clog2(EDGES);
  localparam int PP = $clog2(POLE_PAIRS);

  logic [2:0] prev;
  logic a_ch, b_ch, up, dn;

  assign a_ch = enc[0] ^ prev[0];
  assign b_ch = enc[1] ^ prev[1];
  // A leads B (forward): A changes to differ from B, or B changes to equal A.
  assign up = (a_ch & ~b_ch & (enc[0] != enc[1])) | (b_ch & ~a_ch & (enc[1] == enc[0]));
  assign dn = (a_ch & ~b_ch & (enc[0] == enc[1])) | (b_ch & ~a_ch & (enc[1] != enc[0]));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      prev <= '0; position <= '0; edge_up <= 1'b0; edge_dn <= 1'b0;
      enc_err <= 1'b0; index_seen <= 1'b0;
    end else begin
      prev    <= enc;
      edge_up <= up;
      edge_dn <= dn;
      enc_err <= a_ch & b_ch;
      if (enc[2] & ~prev[2]) begin
        position   <= PW'(EDGES - ANGLE_OFFSET);
        index_seen <= 1'b1;
      end else if (up) position <= position + 1'b1;
      else if (dn)     position <= position - 1'b1;
    end

  // electrical angle: position * POLE_PAIRS modulo one electrical turn
  assign phi = mac_pkg::angle_t'(position[PW-PP-1:0]);
endmodule
