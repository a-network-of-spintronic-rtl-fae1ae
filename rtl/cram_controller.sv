// cram_controller: the controller array that drives the CRAM arrays.
//
// The control bits for the driver lines of every step are preprogrammed
// into a program memory, one word per step. A start pulse activates the
// words one by one, one per clock cycle, and each word is broadcast to every
// array at once; the word that holds OP_END is the last one, and done pulses
// in the cycle after it. Because the sequence lives in memory, changing the
// neuron model only means changing the memory contents: there is no fixed
// control logic beyond this step counter.
//
// The contents are built at elaboration time by cram_ucode_pkg for the
// program PROG and the sizes S, LF, NMAX and NOISE_W, which must match those
// used to lay out the arrays. A preprogrammed, broadcast controller array
// follows the source design; the program format and the single-cycle step
// are this design's choices.
//
// Timing: start is sampled while idle; instr_valid is high for exactly the
// program length in cycles, starting the cycle after start; done is a
// one-cycle pulse after the last word.
module cram_controller
  import cram_pkg::*;
  import cram_ucode_pkg::*;
#(
  parameter prog_e       PROG    = PROG_LIF,
  parameter int unsigned S       = 1,      // weight / lookup-table bit length
  parameter int unsigned LF      = 64,     // filter lookup-table entries
  parameter int unsigned NMAX    = 1024,   // lanes = maximum presynaptic neurons
  parameter int unsigned NOISE_W = 2,      // noise bits added per use
  parameter int unsigned DEPTH   = 8192    // program memory words
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   busy,
  output logic   done,
  output logic   instr_valid,
  output instr_t instr,
  output logic [$clog2(DEPTH)-1:0] pc
);

  instr_t rom [DEPTH];

  initial begin : build
    instr_t q[$];
    if (PROG == PROG_LIF) gen_lif(q, int'(S), int'(LF), int'(NMAX), int'(NOISE_W));
    else                  gen_test(q);
    if (q.size() > DEPTH)
      $fatal(1, "cram_controller: program of %0d words exceeds DEPTH %0d", q.size(), DEPTH);
    for (int i = 0; i < int'(DEPTH); i++)
      rom[i] = (i < q.size()) ? q[i] : instr_t'{op: OP_END, default: '0};
  end

  assign instr       = rom[pc];
  assign instr_valid = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      pc   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          pc   <= '0;
        end
      end else if (instr.op == OP_END) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        pc <= pc + 1'b1;
      end
    end
  end

endmodule
