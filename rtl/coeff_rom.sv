// coeff_rom: coefficient storage of the FIR ADM filter.
//
// Holds G(i) = h(i) * Delta_max for a linear-phase filter of even length
// N_TAPS. Because h(i) = h(N_TAPS-1-i), only the first half is stored. The
// words are sign-and-magnitude: bit COEF_W-1 is the sign, the rest the
// magnitude. The tap counter addresses the ROM with tap + OFF, where
// OFF = 2^A_W - N_TAPS/2. The low A_W bits are XORed with the counter's top
// bit, which mirrors the address in the second half:
//     tap <  N/2 : address = tap + OFF
//     tap >= N/2 : address = (2^(A_W+1) - 1) - (tap + OFF) = (N-1-tap) + OFF
// so address a holds G(a - OFF). Half storage and XOR address folding follow
// the source design; the counter offset is this design's way of making the
// fold exact for a length that is not a power of two.
//
// The table is read from INIT_FILE: N_TAPS/2 hex words of FILE_W bits,
// sign-magnitude, G(0) first. At load time each magnitude is rounded to
// COEF_W-1 bits (add half an output LSB, drop FILE_W-COEF_W bits) and placed
// at address OFF, so one master table serves every coefficient word length
// COEF_W <= FILE_W. Rounding to b bits follows the source design's error
// model; the master-table scheme is this design's choice. The output
// register is the coefficient latch: data for the counter value presented
// with en high appear the next cycle.
module coeff_rom #(
  parameter int unsigned N_TAPS    = 60,
  parameter int unsigned COEF_W    = 16,
  parameter int unsigned FILE_W    = 24,
  parameter string       INIT_FILE = "rtl/coeff_g.hex",
  localparam int unsigned HALF     = N_TAPS / 2,
  localparam int unsigned A_W      = (HALF > 1) ? $clog2(HALF) : 1,
  localparam int unsigned OFF      = (2 ** A_W) - HALF
) (
  input  logic              clk,
  input  logic              en,
  input  logic [A_W:0]      cnt,    // tap index + OFF
  output logic [COEF_W-1:0] coef    // sign-magnitude G
);

  logic [COEF_W-1:0] rom [2 ** A_W];
  logic [A_W-1:0]    addr;

  logic [FILE_W-1:0] master [HALF];

  initial begin
    logic [FILE_W-1:0] mag;
    $readmemh(INIT_FILE, master);
    for (int a = 0; a < 2 ** A_W; a++) rom[a] = '0;
    for (int i = 0; i < HALF; i++) begin
      mag = {1'b0, master[i][FILE_W-2:0]};
      if (FILE_W > COEF_W) mag = (mag + (FILE_W'(1) << (FILE_W - COEF_W - 1))) >> (FILE_W - COEF_W);
      rom[i + OFF] = {master[i][FILE_W-1], mag[COEF_W-2:0]};
    end
  end

  // address folding by exclusive-OR gates
  assign addr = cnt[A_W-1:0] ^ {A_W{cnt[A_W]}};

  always_ff @(posedge clk) begin
    if (en) coef <= rom[addr];
  end

  initial assert (N_TAPS % 2 == 0) else $error("N_TAPS must be even");
  initial assert (COEF_W <= FILE_W) else $error("COEF_W exceeds the master table width");

endmodule
