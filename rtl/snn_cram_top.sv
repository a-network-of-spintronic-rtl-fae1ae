// snn_cram_top: a spiking neural network built as a network of CRAM arrays,
// one array per neuron, connected by a generalized De Bruijn graph.
//
// Every neuron lives entirely inside its own CRAM array: its weights,
// delays, filter lookup table, spike history, membrane potential and all
// intermediate values, and all arithmetic is done by gates inside the array.
// One controller array broadcasts the same instruction to all N arrays, so
// all neurons compute a time step in lockstep. Between compute phases the
// GDBG router (gdbg_network) distributes the output spikes: in log2(N)
// steps every array receives the train of its presynaptic neurons.
//
// One time step, started by step_start while idle:
//   1. ROUTE: the router loads every array's last output spike and runs its
//      log2(N) steps.
//   2. COMPUTE: the controller runs the leaky integrate-and-fire program;
//      its OP_WRSPK step writes each array's routed train into its spike
//      history, its OP_RDSPK step updates each array's output spike.
//   3. step_done pulses; spikes holds the new output spikes.
// A step therefore takes log2(N) + 1 + (program length) + a few cycles.
//
// Initialisation (weights, delays, lookup table, bias, threshold, leak
// factor, LFSR seed, and the router's selection tables when N > NMAX) is
// done through the cfg_* and tbl_* ports while idle; the row layout is
// cram_ucode_pkg::lif_map(S, LF, NMAX, NOISE_W). The network size N is
// scaled far below the source design's billion neurons; all other defaults
// are the source design's main configuration (NMAX = 1024 presynaptic
// neurons, 1-bit weights, 64-entry lookup table, 1024 x 512 cell arrays).
module snn_cram_top
  import cram_pkg::*;
#(
  parameter int unsigned N       = 1024,   // neurons = CRAM arrays
  parameter int unsigned NMAX    = 1024,   // maximum presynaptic neurons = lanes per array
  parameter int unsigned S       = 1,      // weight bit length
  parameter int unsigned LF      = 64,     // filter lookup-table entries
  parameter int unsigned ROWS    = 512,    // cells per lane
  parameter int unsigned NOISE_W = 2,      // noise bits added per use
  parameter int unsigned DEPTH   = 8192,   // controller program memory words
  parameter int unsigned NT      = ($clog2(N) > $clog2(NMAX)) ? $clog2(N) - $clog2(NMAX) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // time-step control
  input  logic                    step_start,
  output logic                    step_busy,
  output logic                    step_done,
  output logic [N-1:0]            spikes,
  // array initialisation and inspection
  input  logic                    cfg_we,
  input  logic [$clog2(N)-1:0]    cfg_array,
  input  logic [ROW_AW-1:0]       cfg_row,
  input  logic [NMAX-1:0]         cfg_data,
  input  logic [$clog2(N)-1:0]    rd_array,
  input  logic [ROW_AW-1:0]       rd_row,
  output logic [NMAX-1:0]         rd_data,
  // router selection tables (used when N > NMAX)
  input  logic                    tbl_we,
  input  logic [$clog2(N)-1:0]    tbl_node,
  input  logic [$clog2(NT+1)-1:0] tbl_step,
  input  logic [$clog2(NMAX)-1:0] tbl_slot,
  input  logic                    tbl_sel,
  input  logic [$clog2(NMAX)-1:0] tbl_addr,
  // phase visibility
  output logic                    route_busy,
  output logic                    compute_busy
);

  typedef enum logic [1:0] {ST_IDLE, ST_ROUTE, ST_COMPUTE} state_e;
  state_e state;

  logic            route_start, route_done;
  logic            ctrl_start, ctrl_done, ctrl_busy, ctrl_valid;
  instr_t          instr;
  logic [NMAX-1:0] trains [N];
  logic [NMAX-1:0] rdata  [N];
  logic [$clog2(DEPTH)-1:0] pc;

  cram_controller #(
    .PROG(PROG_LIF), .S(S), .LF(LF), .NMAX(NMAX), .NOISE_W(NOISE_W), .DEPTH(DEPTH)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (ctrl_start),
    .busy       (ctrl_busy),
    .done       (ctrl_done),
    .instr_valid(ctrl_valid),
    .instr      (instr),
    .pc         (pc)
  );

  gdbg_network #(.N(N), .NMAX(NMAX)) u_net (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (route_start),
    .spikes  (spikes),
    .busy    (route_busy),
    .done    (route_done),
    .trains  (trains),
    .tbl_we  (tbl_we),
    .tbl_node(tbl_node),
    .tbl_step(tbl_step),
    .tbl_slot(tbl_slot),
    .tbl_sel (tbl_sel),
    .tbl_addr(tbl_addr)
  );

  for (genvar i = 0; i < int'(N); i++) begin : g_neuron
    cram_array #(.ROWS(ROWS), .COLS(NMAX)) u_array (
      .clk        (clk),
      .rst_n      (rst_n),
      .instr_valid(ctrl_valid),
      .instr      (instr),
      .spike_in   (trains[i]),
      .spike_out  (spikes[i]),
      .host_we    (cfg_we && (32'(cfg_array) == i)),
      .host_row   (cfg_row),
      .host_wdata (cfg_data),
      .host_rrow  (rd_row),
      .host_rdata (rdata[i]),
      .col_en     ()
    );
  end

  assign rd_data = rdata[rd_array];

  assign route_start  = (state == ST_IDLE) && step_start;
  assign ctrl_start   = (state == ST_ROUTE) && route_done;
  assign step_busy    = (state != ST_IDLE);
  assign compute_busy = ctrl_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      step_done <= 1'b0;
    end else begin
      step_done <= 1'b0;
      unique case (state)
        ST_IDLE:    if (step_start) state <= ST_ROUTE;
        ST_ROUTE:   if (route_done) state <= ST_COMPUTE;
        ST_COMPUTE: if (ctrl_done) begin
                      state     <= ST_IDLE;
                      step_done <= 1'b1;
                    end
        default:    state <= ST_IDLE;
      endcase
    end
  end

  // Configuration only while idle.
  assert property (@(posedge clk) disable iff (!rst_n) (cfg_we || tbl_we) |-> state == ST_IDLE)
    else $error("snn_cram_top: configuration write during a time step");

endmodule
