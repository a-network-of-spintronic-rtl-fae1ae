// gdbg_node: the spike-routing port of one neuron array in the generalized
// De Bruijn graph (GDBG) network.
//
// Each node holds a spike train of up to NMAX bits. At the start of a
// routing phase (load) the train becomes the node's own output spike in bit
// 0. In routing step c (1-based) the node receives the trains of its two
// predecessors, A and B, over NMAX wires each:
//   * c <= log2(NMAX): both trains hold 2**(c-1) valid spikes; the node
//     concatenates them, A in the low half and B above it. No logic beyond
//     placing the bits is needed.
//   * c >  log2(NMAX): both trains are full, so half of the 2*NMAX incoming
//     spikes must be dropped. For every output slot a stored bit indicator
//     picks train A or B and a stored log2(NMAX)-bit address picks the spike
//     in it. There is one such table set per step beyond log2(NMAX).
// The tables are written once at initialisation through the tbl_* port.
// The step rules follow the source design; writing the tables as one
// (indicator, address) pair per output slot, i.e. a gather, is this
// design's reading of its "reordering mask".
//
// Timing: load and step_en act at the rising clock edge; the new train is
// visible the cycle after.
module gdbg_node #(
  parameter int unsigned NMAX = 1024,          // wires per link, spikes per train
  parameter int unsigned LOGN = 10,            // routing steps, log2 of neuron count
  parameter int unsigned KMAX = $clog2(NMAX),
  parameter int unsigned NXS  = (LOGN > KMAX) ? LOGN - KMAX : 0,  // selection steps
  parameter int unsigned NT   = (NXS > 0) ? NXS : 1,
  parameter int unsigned CW   = $clog2(LOGN + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              own_spike,
  input  logic              step_en,
  input  logic [CW-1:0]     step,        // c, 1-based
  input  logic [NMAX-1:0]   in_a,
  input  logic [NMAX-1:0]   in_b,
  output logic [NMAX-1:0]   train,
  // selection table write port
  input  logic              tbl_we,
  input  logic [$clog2(NT+1)-1:0] tbl_step,  // 0 = first step beyond log2(NMAX)
  input  logic [$clog2(NMAX)-1:0] tbl_slot,
  input  logic              tbl_sel,     // 0: train A, 1: train B
  input  logic [$clog2(NMAX)-1:0] tbl_addr
);

  localparam int unsigned AW = $clog2(NMAX);

  logic [NMAX-1:0] sel_tbl  [NT];
  logic [AW-1:0]   addr_tbl [NT][NMAX];
  logic [NMAX-1:0] cat, gat;
  logic [NMAX-1:0] lenmask;
  int unsigned     xs;

  // concatenation for c <= log2(NMAX)
  always_comb begin
    lenmask = '0;
    for (int unsigned i = 0; i < NMAX; i++)
      if (32'(step) >= 1 && i < (32'd1 << (32'(step) - 1))) lenmask[i] = 1'b1;
    cat = (in_a & lenmask) | ((in_b & lenmask) << ((32'd1 << (32'(step) - 1)) & 32'(NMAX - 1)));
  end

  // selection for c > log2(NMAX)
  always_comb begin
    xs  = (32'(step) > KMAX) ? 32'(step) - KMAX - 1 : 0;
    if (xs >= NT) xs = 0;
    gat = '0;
    for (int unsigned i = 0; i < NMAX; i++)
      gat[i] = sel_tbl[xs][i] ? in_b[addr_tbl[xs][i]] : in_a[addr_tbl[xs][i]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      train <= '0;
    end else if (load) begin
      train <= NMAX'(own_spike);
    end else if (step_en) begin
      train <= (32'(step) > KMAX) ? gat : cat;
    end
  end

  always_ff @(posedge clk) begin
    if (tbl_we && 32'(tbl_step) < NT) begin
      sel_tbl[tbl_step][tbl_slot]  <= tbl_sel;
      addr_tbl[tbl_step][tbl_slot] <= tbl_addr;
    end
  end

endmodule
