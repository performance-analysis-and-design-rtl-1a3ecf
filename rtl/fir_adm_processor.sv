// fir_adm_processor: serial digital processor of the FIR ADM filter.
//
// For every input sample it computes, for each channel, the incremental output
//     dy(k) = sum_{i=0}^{N_TAPS-1} G(i) * 2^-l(k-i) * b(k-i-1)
// with one tap per clock and no multiplier. Per sample it runs two phases:
//   WRITE  the coders' words {b(k-1), delta-1 bit} are written, one channel
//          per cycle through a select, into history_ram at the ring slot
//          `head` of each channel's region.
//   TAPS   for each channel in turn, taps i = N_TAPS-1 down to 0 are read:
//          the ring slot of sample k-i from history_ram and G(i) from
//          coeff_rom (address counter plus XOR folding). The level of the
//          oldest sample, l(k-N+1), is kept per channel in a level_counter;
//          a second level_counter is preset from it at tap N_TAPS-1 and then
//          stepped with each younger sample's delta-1 bit, which rebuilds
//          l(k-i) exactly. When tap N_TAPS-2 is read, the oldest-level
//          counter takes the same step, so it holds l(k-N+2) for the next
//          sample. tap_alu shifts, adds or subtracts and sums the terms.
// Working from the oldest sample forward is what lets one direction bit per
// sample replace a stored level; the counter pair, sign-bit/delta-1 storage,
// ROM with XOR addressing and the multi-channel RAM sharing follow the source
// design. The pipeline, the state machine and the start-up rule below are
// this design's choices.
//
// Start-up: until N_TAPS samples have been written, taps older than the first
// sample count as zero and their level as L_MAX (the coder's reset level).
//
// Pipeline: S0 issues the RAM and ROM reads, S1 has the read data and steps
// the level counters, S2 adds in tap_alu, S3 latches dy. Timing: start is
// sampled in IDLE; WRITE takes N_CH cycles, TAPS N_CH * N_TAPS cycles; the dy
// of channel c is presented (dy_valid high for one cycle, dy_ch = c) 4 cycles
// after its last tap was issued, and the last one 1 + N_CH + N_CH * N_TAPS + 3
// cycles after start. busy is high from the cycle after start until that
// cycle. hist_in must hold still while busy.
module fir_adm_processor
  import adm_pkg::*;
#(
  parameter int unsigned N_TAPS    = 60,
  parameter int unsigned N_CH      = 1,
  parameter int unsigned COEF_W    = 16,
  parameter int unsigned ACC_W     = 24,
  parameter int unsigned L_MAX     = 10,
  parameter string       INIT_FILE = "rtl/coeff_g.hex",
  localparam int unsigned CH_W     = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  hist_t                   hist_in [N_CH],
  output logic                    busy,
  output logic                    dy_valid,
  output logic [CH_W-1:0]         dy_ch,
  output logic signed [ACC_W-1:0] dy
);

  localparam int unsigned DEPTH = N_TAPS * N_CH;
  localparam int unsigned RA_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned T_W   = $clog2(N_TAPS + 1);
  localparam int unsigned HALF  = N_TAPS / 2;
  localparam int unsigned A_W   = (HALF > 1) ? $clog2(HALF) : 1;
  localparam int unsigned OFF   = (2 ** A_W) - HALF;

  typedef enum logic [1:0] {IDLE, WRITE, TAPS, DRAIN} state_t;

  typedef struct packed {
    logic            valid;
    logic [CH_W-1:0] ch;
    logic            first;    // tap N_TAPS-1: preset the level replay
    logic            advance;  // tap N_TAPS-2: step the oldest-level counter
    logic            last;     // tap 0: dy complete after this tap
    logic            use_tap;  // sample k-i exists
  } ctrl_t;

  state_t          state;
  logic [CH_W-1:0] ch;
  logic [T_W-1:0]  tap;      // i, counts down
  logic [A_W:0]    rom_cnt;  // i + OFF, the ROM address counter
  logic [T_W-1:0]  head;     // ring slot of the newest sample
  logic [T_W-1:0]  rp;       // ring slot being read
  logic [RA_W-1:0] base;     // ch * N_TAPS
  logic [T_W-1:0]  n_fill;   // samples stored so far, up to N_TAPS
  logic [1:0]      drain;

  ctrl_t ctrl0, ctrl1, ctrl2, ctrl3;

  // history RAM ports
  logic            ram_we, ram_re;
  logic [RA_W-1:0] ram_waddr, ram_raddr;
  hist_t           ram_wdata, ram_rdata;

  // coefficient path
  logic [COEF_W-1:0] rom_coef, coef_q;
  logic              sign_q;

  // level replay
  level_t lk_q;
  level_t lold_q [N_CH];
  logic   step_up;

  logic signed [ACC_W-1:0] alu_acc;

  function automatic logic [T_W-1:0] ring_inc(logic [T_W-1:0] p);
    return (p == T_W'(N_TAPS - 1)) ? '0 : T_W'(p + 1'b1);
  endfunction

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      ch      <= '0;
      tap     <= '0;
      rom_cnt <= '0;
      head    <= '0;
      rp      <= '0;
      base    <= '0;
      n_fill  <= '0;
      drain   <= '0;
    end else begin
      case (state)
        IDLE: if (start) begin
          state  <= WRITE;
          ch     <= '0;
          base   <= '0;
          if (n_fill != T_W'(N_TAPS)) n_fill <= T_W'(n_fill + 1'b1);
        end
        WRITE: begin
          if (ch == CH_W'(N_CH - 1)) begin
            state   <= TAPS;
            ch      <= '0;
            base    <= '0;
            tap     <= T_W'(N_TAPS - 1);
            rom_cnt <= (A_W + 1)'(N_TAPS - 1 + OFF);
            rp      <= ring_inc(head);
          end else begin
            ch   <= CH_W'(ch + 1'b1);
            base <= RA_W'(base + N_TAPS);
          end
        end
        TAPS: begin
          rp <= ring_inc(rp);
          if (tap == '0) begin
            tap     <= T_W'(N_TAPS - 1);
            rom_cnt <= (A_W + 1)'(N_TAPS - 1 + OFF);
            if (ch == CH_W'(N_CH - 1)) begin
              state <= DRAIN;
              drain <= 2'd3;
              head  <= ring_inc(head);
            end else begin
              ch   <= CH_W'(ch + 1'b1);
              base <= RA_W'(base + N_TAPS);
            end
          end else begin
            tap     <= T_W'(tap - 1'b1);
            rom_cnt <= (A_W + 1)'(rom_cnt - 1'b1);
          end
        end
        DRAIN: begin
          drain <= drain - 1'b1;
          if (drain == 2'd1) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // channel select into the RAM
  always_comb begin
    ram_we    = (state == WRITE);
    ram_waddr = RA_W'(base + head);
    ram_wdata = hist_in[ch];
    ram_re    = (state == TAPS);
    ram_raddr = RA_W'(base + rp);
  end

  always_comb begin
    ctrl0.valid   = (state == TAPS);
    ctrl0.ch      = ch;
    ctrl0.first   = (tap == T_W'(N_TAPS - 1));
    ctrl0.advance = (tap == T_W'(N_TAPS - 2));
    ctrl0.last    = (tap == '0);
    ctrl0.use_tap = (tap < n_fill);
  end

  history_ram #(.DEPTH(DEPTH)) u_hist (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata)
  );

  coeff_rom #(.N_TAPS(N_TAPS), .COEF_W(COEF_W), .INIT_FILE(INIT_FILE)) u_rom (
    .clk, .en(state == TAPS), .cnt(rom_cnt), .coef(rom_coef)
  );

  // ---------------- S1: read data, level replay ----------------
  // a sample that does not exist yet holds the level at L_MAX
  assign step_up = ctrl1.use_tap ? ram_rdata.up : 1'b1;

  level_counter #(.L_MAX(L_MAX)) u_lki (
    .clk, .rst_n,
    .load    (ctrl1.valid && ctrl1.first),
    .load_val(lold_q[ctrl1.ch]),
    .step    (ctrl1.valid),
    .up      (step_up),
    .q       (lk_q)
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_lold
    level_counter #(.L_MAX(L_MAX)) u_lold (
      .clk, .rst_n,
      .load    (1'b0),
      .load_val('0),
      .step    (ctrl1.valid && ctrl1.advance && ctrl1.ch == CH_W'(c)),
      .up      (step_up),
      .q       (lold_q[c])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl1    <= '0;
      ctrl2    <= '0;
      ctrl3    <= '0;
      coef_q   <= '0;
      sign_q   <= 1'b0;
      dy       <= '0;
      dy_valid <= 1'b0;
      dy_ch    <= '0;
    end else begin
      ctrl1  <= ctrl0;
      ctrl2  <= ctrl1;
      ctrl3  <= ctrl2;
      coef_q <= rom_coef;                // coefficient latch
      sign_q <= ram_rdata.inc_sign;
      dy_valid <= ctrl3.valid && ctrl3.last;
      if (ctrl3.valid && ctrl3.last) begin
        dy    <= alu_acc;                // incremental-output latch
        dy_ch <= ctrl3.ch;
      end
    end
  end

  // ---------------- S2: shift and add ----------------
  tap_alu #(.COEF_W(COEF_W), .ACC_W(ACC_W)) u_alu (
    .clk, .rst_n,
    .en      (ctrl2.valid),
    .first   (ctrl2.first),
    .use_tap (ctrl2.use_tap),
    .coef    (coef_q),
    .level   (lk_q),
    .inc_sign(sign_q),
    .acc     (alu_acc)
  );

  initial assert (N_TAPS >= 4 && N_TAPS % 2 == 0) else $error("N_TAPS must be even and at least 4");

endmodule
