// ad7656_model: behavioural model of the AD7656 six-channel simultaneous-
// sampling 12-bit ADC, hardware mode, for testbenches only (not
// synthesizable). CONVST rising samples all six inputs `ain`; BUSY is high
// for TCONV_NS. Serial mode (SERIAL=1): while CS is low, each falling SCLK
// edge puts the next bit on DOUT A/B/C, MSB first, two 16-bit words per line
// (4 zeros + 12 data bits): A = ch1, ch2; B = ch3, ch4; C = ch5, ch6.
// Parallel mode: each CS&RD low phase drives the next channel on DB[11:0].
// Like the real part, the first conversion after RESET ignores the RANGE
// pin, modelled here as results at half scale.
module ad7656_model #(
  parameter bit SERIAL   = 1'b1,
  parameter int TCONV_NS = 3000
) (
  input  logic              convst,
  input  logic              reset,
  input  logic              cs_n,
  input  logic              sclk,
  input  logic              rd_n,
  input  logic [11:0]       ain [6],
  output logic              busy,
  output logic [2:0]        dout,
  output logic [11:0]       db,
  output int                n_conv
);
  logic [11:0] res [6];
  logic [31:0] sh [3];
  int ptr;
  bit first;

  initial begin
    busy = 0; dout = '0; db = '0; ptr = 0; first = 1; n_conv = 0;
    for (int i = 0; i < 6; i++) res[i] = '0;
    for (int i = 0; i < 3; i++) sh[i] = '0;
  end

  always @(posedge reset) first = 1;

  always @(posedge convst) begin
    #5 busy = 1;
    for (int i = 0; i < 6; i++) res[i] = first ? 12'($signed(ain[i]) >>> 1) : ain[i];
    first = 0;
    n_conv++;
    #(TCONV_NS) busy = 0;
    ptr = 0;
    for (int l = 0; l < 3; l++) sh[l] = {4'b0, res[2*l], 4'b0, res[2*l+1]};
  end

  // serial
  always @(negedge sclk) if (SERIAL && !cs_n) begin
    #3;
    for (int l = 0; l < 3; l++) begin
      dout[l] = sh[l][31];
      sh[l]   = {sh[l][30:0], 1'b0};
    end
  end

  // parallel
  always @(negedge rd_n) if (!SERIAL && !cs_n) begin
    #8 db = res[ptr];
  end
  always @(posedge rd_n) if (!SERIAL && !cs_n) ptr = (ptr + 1) % 6;
endmodule
