// gdbg_network: spike distribution between N neuron arrays over a
// generalized De Bruijn graph.
//
// Node u drives links to nodes (2u) mod N and (2u+1) mod N, so node v
// listens to v>>1 (train A) and (v>>1)+N/2 (train B): 2N links of NMAX
// wires each instead of a link per neuron pair. A routing phase starts with
// every node loading its own spike, then runs log2(N) steps, one per cycle,
// all nodes in lockstep (see gdbg_node for what a step does). No packets,
// no arbitration: the phase always takes the same number of cycles.
//
// When N <= NMAX every node ends with all N spikes, the spike of neuron j in
// slot bitreverse(j) (log2(N) bits), whatever the node; the weights are
// stored in that order. When N > NMAX the selection tables written at
// initialisation decide which NMAX presynaptic neurons reach each node.
//
// Timing: start (while idle) loads the spikes at the next edge; steps
// 1..log2(N) follow on consecutive edges; done pulses in the cycle after the
// last step, so a phase takes log2(N) + 1 cycles from start to done.
module gdbg_network #(
  parameter int unsigned N    = 16,
  parameter int unsigned NMAX = 1024,
  parameter int unsigned LOGN = $clog2(N),
  parameter int unsigned KMAX = $clog2(NMAX),
  parameter int unsigned NXS  = (LOGN > KMAX) ? LOGN - KMAX : 0,
  parameter int unsigned NT   = (NXS > 0) ? NXS : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [N-1:0]          spikes,       // output spikes of all neurons
  output logic                  busy,
  output logic                  done,
  output logic [NMAX-1:0]       trains [N],   // routed input trains, one per neuron
  // selection table write port
  input  logic                  tbl_we,
  input  logic [$clog2(N)-1:0]  tbl_node,
  input  logic [$clog2(NT+1)-1:0] tbl_step,
  input  logic [$clog2(NMAX)-1:0] tbl_slot,
  input  logic                  tbl_sel,
  input  logic [$clog2(NMAX)-1:0] tbl_addr
);

  localparam int unsigned CW = $clog2(LOGN + 1);

  logic          load;
  logic [CW-1:0] step;

  for (genvar v = 0; v < int'(N); v++) begin : g_node
    gdbg_node #(.NMAX(NMAX), .LOGN(LOGN)) u_node (
      .clk      (clk),
      .rst_n    (rst_n),
      .load     (load),
      .own_spike(spikes[v]),
      .step_en  (busy),
      .step     (step),
      .in_a     (trains[v / 2]),
      .in_b     (trains[v / 2 + N / 2]),
      .train    (trains[v]),
      .tbl_we   (tbl_we && (32'(tbl_node) == v)),
      .tbl_step (tbl_step),
      .tbl_slot (tbl_slot),
      .tbl_sel  (tbl_sel),
      .tbl_addr (tbl_addr)
    );
  end

  assign load = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      step <= '0;
    end else begin
      done <= 1'b0;
      if (load) begin
        busy <= 1'b1;
        step <= CW'(1);
      end else if (busy) begin
        if (32'(step) == LOGN) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0) else $fatal(1, "gdbg_network: N must be a power of two");
    assert (NMAX >= 2 && (NMAX & (NMAX - 1)) == 0) else $fatal(1, "gdbg_network: NMAX must be a power of two");
  end

endmodule
