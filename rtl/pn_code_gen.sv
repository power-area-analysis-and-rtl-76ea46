// pn_code_gen: programmable PN code generator.
//
// An 8-stage Fibonacci LFSR (stages 1..8, stage 1 receives the feedback).
// The feedback-select logic XORs the stages named by the code select word
// s3s2s1s0 (tap sets in dsss_pkg::tap_mask) and the output multiplexer takes
// the PN chip from stage 5, 6, 7 or 8 according to s3s2, giving maximal
// sequences of period 31, 63, 127 or 255 for the 32/64/128/256-chip code
// lengths. The structure (eight stages, feedback select, output taps at
// stages 5 to 8) follows the design; the seed, the restart input and the
// behaviour of the "no coding"/reserved selections (PN held at 0) are this
// design's own choices.
//
// Timing: pn is the chip for the current cycle and the register advances on
// every clock edge. When restart is high, the current cycle uses the seed
// as its state, so pn is the first chip of the sequence in that very cycle.
// sel is expected to change only together with rst_n or restart.
module pn_code_gen
  import dsss_pkg::*;
#(
  parameter lfsr_t SEED = 8'hFF
) (
  input  logic      clk,
  input  logic      rst_n,     // synchronous, active low: state <= SEED
  input  logic      restart,   // this cycle starts the sequence from SEED
  input  code_sel_t sel,       // s3s2s1s0
  output logic      pn         // current PN chip
);

  lfsr_t state_q, cur, nxt;
  lfsr_t taps;
  logic  fb;

  always_comb begin
    cur  = restart ? SEED : state_q;
    taps = tap_mask(sel);
    fb   = ^(cur & taps);
    nxt  = {cur[LFSR_STAGES-2:0], fb};   // stage i -> stage i+1, fb -> stage 1
    // length multiplexer: stage 5 + s3s2; no coding gives a constant 0
    pn   = (taps == '0) ? 1'b0 : cur[code_stages(sel.len) - 1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= SEED;
    else        state_q <= nxt;
  end

  initial assert (SEED != '0) else $error("pn_code_gen: SEED must be non-zero");

endmodule
