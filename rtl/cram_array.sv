// cram_array: logic-level model of one spintronic Computational RAM (CRAM)
// array, the compute node that holds and processes one neuron.
//
// The array is a memory of ROWS x COLS cells. Viewed transposed, each of the
// COLS lanes is one physical CRAM column and holds the data of one synapse;
// a row is one cell position across all lanes. Besides plain row reads and
// writes, the array executes one operation per cycle from the instruction
// word broadcast by the controller array, in every lane at once (column-level
// parallelism):
//   * bulk preset of up to PRESET_MAX consecutive rows to 0 or 1,
//   * a Boolean gate whose inputs and output are cells of the same lane: the
//     output switches away from its preset value when the count of ones on
//     its inputs meets the gate's condition (see cram_pkg), so a gate whose
//     output was not preset gives the wrong result, as in the device,
//   * LSHIFT: read a row and write it back displaced by 2**b lanes, which is
//     how the reduction tree moves partial sums between lanes,
//   * LOADEN: load the column enable from a row; masked instructions then
//     only change enabled lanes,
//   * WRSPK / RDSPK: write the routed input spike train into a row, latch the
//     neuron's output spike from lane 0 of a row.
// The MTJ cells, bitline voltages and sense circuits are not modelled: this
// is the array's logic function, written as synthesizable logic. The bulk
// preset limit and the lane-shift operation are this model's choices.
//
// Timing: every operation takes effect at the rising clock edge on which
// instr_valid is high. The host port writes a row at a clock edge and reads a
// row combinationally; it is for initialisation and must not be used while
// instructions run.
module cram_array
  import cram_pkg::*;
#(
  parameter int unsigned ROWS       = 512,   // cells per lane
  parameter int unsigned COLS       = 1024,  // lanes = maximum presynaptic neurons
  parameter int unsigned PRESET_MAX = 8      // rows covered by one bulk preset
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction broadcast by the controller array
  input  logic            instr_valid,
  input  instr_t          instr,
  // routed input spike train, written by OP_WRSPK
  input  logic [COLS-1:0] spike_in,
  // neuron output spike, updated by OP_RDSPK
  output logic            spike_out,
  // host port for initialisation and inspection
  input  logic            host_we,
  input  logic [ROW_AW-1:0] host_row,
  input  logic [COLS-1:0] host_wdata,
  input  logic [ROW_AW-1:0] host_rrow,
  output logic [COLS-1:0] host_rdata,
  output logic [COLS-1:0] col_en
);

  localparam int unsigned RAW = (ROWS > 1) ? $clog2(ROWS) : 1;

  logic [COLS-1:0] mem [ROWS];

  // row address as seen by an array of ROWS rows
  function automatic logic [RAW-1:0] ridx(input row_t r);
    return r[RAW-1:0];
  endfunction

  logic [COLS-1:0] ra, rb, rc, rd, re, old0, old1;
  logic [COLS-1:0] sw;          // lanes whose output switches
  logic            pval;        // preset value of the current gate
  logic            is_gate;
  logic [COLS-1:0] s1, c1, s2, c2;

  assign ra   = mem[ridx(instr.a)];
  assign rb   = mem[ridx(instr.b)];
  assign rc   = mem[ridx(instr.c)];
  assign rd   = mem[ridx(instr.d)];
  assign re   = mem[ridx(instr.e)];
  assign old0 = mem[ridx(instr.o0)];
  assign old1 = mem[ridx(instr.o1)];
  assign host_rdata = mem[ridx(host_rrow)];

  // five-input majority through two full-adder stages
  assign s1 = ra ^ rb ^ rc;
  assign c1 = (ra & rb) | (ra & rc) | (rb & rc);
  assign s2 = rd ^ re ^ s1;
  assign c2 = (rd & re) | (rd & s1) | (re & s1);

  always_comb begin
    sw      = '0;
    pval    = 1'b0;
    is_gate = 1'b1;
    unique case (instr.op)
      OP_NAND2: begin pval = 1'b0; sw = ~(ra & rb); end
      OP_AND2:  begin pval = 1'b1; sw = ~(ra & rb); end
      OP_OR2:   begin pval = 1'b0; sw = ra | rb; end
      OP_NOR2:  begin pval = 1'b1; sw = ra | rb; end
      OP_INV,
      OP_INV2:  begin pval = 1'b1; sw = ra; end
      OP_COPY:  begin pval = 1'b0; sw = ra; end
      OP_MAJ3:  begin pval = 1'b0; sw = (ra & rb) | (ra & rc) | (rb & rc); end
      OP_MAJ5:  begin pval = 1'b0; sw = (c1 & c2) | ((c1 | c2) & s2); end
      default:  is_gate = 1'b0;
    endcase
    if (instr.masked) sw = sw & col_en;
  end

  always_ff @(posedge clk) begin
    if (host_we) begin
      mem[ridx(host_row)] <= host_wdata;
    end else if (instr_valid) begin
      if (is_gate) begin
        mem[ridx(instr.o0)] <= pval ? (old0 & ~sw) : (old0 | sw);
        if (instr.op == OP_INV2)
          mem[ridx(instr.o1)] <= pval ? (old1 & ~sw) : (old1 | sw);
      end
      unique case (instr.op)
        OP_PRESET0, OP_PRESET1: begin
          for (int unsigned k = 0; k < PRESET_MAX; k++) begin
            if (32'(instr.o0) + k <= 32'(instr.o1) && 32'(instr.o0) + k < ROWS) begin
              if (instr.masked)
                mem[RAW'(32'(instr.o0) + k)] <= (instr.op == OP_PRESET1)
                    ? (mem[RAW'(32'(instr.o0) + k)] | col_en) : (mem[RAW'(32'(instr.o0) + k)] & ~col_en);
              else
                mem[RAW'(32'(instr.o0) + k)] <= (instr.op == OP_PRESET1) ? '1 : '0;
            end
          end
        end
        OP_LSHIFT: mem[ridx(instr.o0)] <= ra >> (1 << instr.b);
        OP_WRSPK:  mem[ridx(instr.o0)] <= spike_in;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_en    <= '1;
      spike_out <= 1'b0;
    end else if (instr_valid && !host_we) begin
      if (instr.op == OP_LOADEN) col_en <= ra;
      if (instr.op == OP_RDSPK)  spike_out <= ra[0];
    end
  end

  // The host port is for initialisation only.
  assert property (@(posedge clk) disable iff (!rst_n) !(host_we && instr_valid))
    else $error("cram_array: host write while an instruction runs");
  // A preset range must fit one bulk preset.
  assert property (@(posedge clk) disable iff (!rst_n)
      instr_valid && (instr.op == OP_PRESET0 || instr.op == OP_PRESET1)
      |-> (32'(instr.o1) >= 32'(instr.o0) && 32'(instr.o1) - 32'(instr.o0) < PRESET_MAX))
    else $error("cram_array: preset range too long");

endmodule
