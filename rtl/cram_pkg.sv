// cram_pkg: types shared by the CRAM array, its controller array and the
// network top.
//
// A CRAM array is described here in its transposed form: a "lane" is one
// physical CRAM column (one synapse), a "row" is the set of cells at one
// position in every lane. One instruction (one driver-line word of the
// controller array) performs one operation in every lane at once.
//
// Gate model. A CRAM gate never computes its output directly: the output
// cell is first preset, then a current that depends on how many inputs hold
// logic 1 may switch it to the opposite value. Each gate therefore has a
// preset value and a switching condition on the count of ones among its
// inputs:
//   gate   inputs preset  switches when
//   NAND2  2      0       count < 2
//   AND2   2      1       count < 2
//   OR2    2      0       count >= 1
//   NOR2   2      1       count >= 1
//   INV    1      1       count >= 1   (INV2 writes two outputs at once)
//   COPY   1      0       count >= 1
//   MAJ3   3      0       count >= 2
//   MAJ5   5      0       count >= 3
// If the output was not preset correctly the result is wrong, exactly as in
// the device. NAND, AND, INV, INV1-2, MAJ3, MAJ5 and COPY are the gates the
// design uses; which preset value goes with which gate is this model's choice.
package cram_pkg;

  // width of a row address field in an instruction (up to 1024 rows)
  localparam int unsigned ROW_AW = 10;

  typedef enum logic [4:0] {
    OP_NOP     = 5'd0,
    OP_PRESET0 = 5'd1,   // rows o0..o1 := 0 (bulk preset)
    OP_PRESET1 = 5'd2,   // rows o0..o1 := 1 (bulk preset)
    OP_NAND2   = 5'd3,
    OP_AND2    = 5'd4,
    OP_OR2     = 5'd5,
    OP_NOR2    = 5'd6,
    OP_INV     = 5'd7,
    OP_INV2    = 5'd8,   // INV1-2: one input, outputs o0 and o1
    OP_COPY    = 5'd9,
    OP_MAJ3    = 5'd10,
    OP_MAJ5    = 5'd11,
    OP_LSHIFT  = 5'd12,  // o0[lane] := a[lane + 2**b] (read, write back displaced)
    OP_LOADEN  = 5'd13,  // column enable := row a
    OP_WRSPK   = 5'd14,  // o0 := incoming spike train
    OP_RDSPK   = 5'd15,  // output spike := row a, lane 0
    OP_END     = 5'd16
  } op_e;

  typedef logic [ROW_AW-1:0] row_t;

  // One driver-line word of the controller array.
  typedef struct packed {
    op_e  op;
    logic masked;   // 1: only lanes whose column enable is set take part
    row_t o0;       // output row (first output, or first row of a preset range)
    row_t o1;       // second output of INV2, or last row of a preset range
    row_t a;
    row_t b;        // second input; shift exponent for OP_LSHIFT
    row_t c;
    row_t d;
    row_t e;
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // Programs the controller array can hold.
  typedef enum logic [1:0] {
    PROG_LIF  = 2'd0,    // one leaky integrate-and-fire time step
    PROG_TEST = 2'd1     // arithmetic self-test: adder, multiplier, LFSR
  } prog_e;

  function automatic int unsigned clog2i(input int unsigned v);
    int unsigned r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

endpackage
