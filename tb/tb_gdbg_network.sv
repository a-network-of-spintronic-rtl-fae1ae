// tb_gdbg_network: checks spike distribution over the generalized De Bruijn
// graph.
//
// Two networks with 8 wires per link are tested: 8 neurons (every neuron
// reaches every node, no selection needed) and 16 neurons, the example of
// the source design with one selection step. The reference tracks, for
// every node and slot, which neuron's spike it holds, stepping through the
// graph edges (node u feeds 2u mod N and 2u+1 mod N) independently of the
// RTL's wiring. With 8 neurons it also checks the closed form: slot p of
// every node holds neuron bitreverse(p). Random spikes and random selection
// tables are used; the phase must take log2(N) routing cycles.
module tb_gdbg_network;

  localparam int NMAX = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  // 16-neuron network
  logic            s16, b16, d16;
  logic [15:0]     sp16;
  logic [NMAX-1:0] tr16 [16];
  logic            we16, sel16;
  logic [3:0]      node16;
  logic [1:0]      step16;
  logic [2:0]      slot16, addr16;

  // 8-neuron network
  logic            s8, b8, d8;
  logic [7:0]      sp8;
  logic [NMAX-1:0] tr8 [8];

  gdbg_network #(.N(16), .NMAX(NMAX)) u16 (
    .clk, .rst_n, .start(s16), .spikes(sp16), .busy(b16), .done(d16), .trains(tr16),
    .tbl_we(we16), .tbl_node(node16), .tbl_step(step16), .tbl_slot(slot16),
    .tbl_sel(sel16), .tbl_addr(addr16)
  );

  gdbg_network #(.N(8), .NMAX(NMAX)) u8 (
    .clk, .rst_n, .start(s8), .spikes(sp8), .busy(b8), .done(d8), .trains(tr8),
    .tbl_we(1'b0), .tbl_node(3'd0), .tbl_step(1'b0), .tbl_slot(3'd0),
    .tbl_sel(1'b0), .tbl_addr(3'd0)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // selection tables of the 16-neuron network (one selection step)
  bit tsel  [16][NMAX];
  int taddr [16][NMAX];

  // Source-tracking reference: which neuron's spike each slot ends with.
  function automatic void route_ref(input int n, input int steps, input int kmax,
                                    output int src [16][NMAX]);
    int cur [16][NMAX];
    int nxt [16][NMAX];
    int len;
    for (int v = 0; v < n; v++)
      for (int p = 0; p < NMAX; p++) cur[v][p] = (p == 0) ? v : -1;
    for (int c = 1; c <= steps; c++) begin
      for (int v = 0; v < n; v++) begin
        int pa, pb;
        pa = -1; pb = -1;
        // the two nodes with an edge into v
        for (int u = 0; u < n; u++) begin
          if ((2 * u) % n == v || (2 * u + 1) % n == v) begin
            if (pa < 0) pa = u; else pb = u;
          end
        end
        len = 1 << (c - 1);
        for (int p = 0; p < NMAX; p++) begin
          if (c <= kmax)
            nxt[v][p] = (p < len) ? cur[pa][p] : (p < 2 * len) ? cur[pb][p - len] : -1;
          else
            nxt[v][p] = tsel[v][p] ? cur[pb][taddr[v][p]] : cur[pa][taddr[v][p]];
        end
      end
      cur = nxt;
    end
    src = cur;
  endfunction

  function automatic int bitrev3(input int p);
    return ((p & 1) << 2) | (p & 2) | ((p >> 2) & 1);
  endfunction

  initial begin
    int src [16][NMAX];
    int cyc16, cyc8, done_at16;
    s16 = 0; s8 = 0; sp16 = '0; sp8 = '0; we16 = 0; sel16 = 0; node16 = '0;
    step16 = '0; slot16 = '0; addr16 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int trial = 0; trial < 20; trial++) begin
      // new selection tables every few trials
      if (trial % 5 == 0) begin
        for (int v = 0; v < 16; v++) begin
          for (int p = 0; p < NMAX; p++) begin
            tsel[v][p]  = 1'($urandom);
            taddr[v][p] = $urandom_range(0, NMAX - 1);
            @(negedge clk);
            we16 = 1; node16 = 4'(v); step16 = 2'd0; slot16 = 3'(p);
            sel16 = tsel[v][p]; addr16 = 3'(taddr[v][p]);
          end
        end
        @(negedge clk);
        we16 = 0;
      end
      sp16 = 16'($urandom);
      sp8  = 8'($urandom);
      if (trial == 0) begin sp16 = 16'h8001; sp8 = 8'h01; end
      @(negedge clk);
      s16 = 1; s8 = 1;
      @(negedge clk);
      s16 = 0; s8 = 0;
      cyc16 = 0; cyc8 = 0; done_at16 = 0;
      for (int k = 0; k < 12; k++) begin
        if (b16) cyc16++;
        if (b8)  cyc8++;
        if (d16) done_at16 = k;
        @(negedge clk);
      end
      checks++;
      if (cyc16 != 4 || cyc8 != 3) begin
        failures++;
        $display("routing cycles %0d/%0d, expected 4/3", cyc16, cyc8);
      end
      checks++;
      if (done_at16 != 4) begin failures++; $display("done at %0d", done_at16); end

      route_ref(16, 4, 3, src);
      for (int v = 0; v < 16; v++)
        for (int p = 0; p < NMAX; p++) begin
          checks++;
          if (tr16[v][p] !== ((src[v][p] >= 0) ? sp16[src[v][p]] : 1'b0)) begin
            failures++;
            if (failures < 20) $display("N=16 node %0d slot %0d: got %b src %0d", v, p, tr16[v][p], src[v][p]);
          end
        end
      route_ref(8, 3, 3, src);
      for (int v = 0; v < 8; v++)
        for (int p = 0; p < NMAX; p++) begin
          checks += 2;
          if (src[v][p] != bitrev3(p)) begin
            failures++;
            $display("reference slot %0d of node %0d holds %0d", p, v, src[v][p]);
          end
          if (tr8[v][p] !== sp8[bitrev3(p)]) begin
            failures++;
            if (failures < 20) $display("N=8 node %0d slot %0d: got %b", v, p, tr8[v][p]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
