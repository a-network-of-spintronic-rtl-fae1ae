// tb_snn_cram_top: end-to-end test of the CRAM spiking network.
//
// Builds a 16-neuron network with 8 presynaptic slots per neuron (so the
// router needs one selection step, as in the source design's 16-neuron
// example), 2-bit weights and a 4-entry filter table. Every array gets
// random weights, delays, filter table, bias, threshold, leak factor and
// LFSR seed through the configuration port, the router random selection
// tables. Then it runs several time steps and after each one compares every
// neuron's output spike and membrane potential with a reference model that
// computes the time step directly in integer arithmetic: routing by
// tracking each spike along the graph edges, then delay gating, filter
// convolution with rounding, weighting, bias, LFSR noise, leak, threshold
// and reset. It checks that routing takes log2(N) cycles and computing one
// cycle per program word, and counts how often each mechanism occurred:
// concatenating and selecting routing steps, lanes disabled by the delay
// compare, spikes, resets of a nonzero potential, leak and noise.
module tb_snn_cram_top;
  import cram_pkg::*;
  import cram_ucode_pkg::*;

  localparam int N       = 16;
  localparam int NMAX    = 8;
  localparam int S       = 2;
  localparam int LF      = 4;
  localparam int ROWS    = 128;
  localparam int NOISE_W = 2;
  localparam int T       = 14;     // time steps
  localparam int LOGN    = $clog2(N);
  localparam int KMAX    = $clog2(NMAX);
  localparam int NT      = (LOGN > KMAX) ? LOGN - KMAX : 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  logic                    step_start, step_busy, step_done;
  logic [N-1:0]            spikes;
  logic                    cfg_we;
  logic [$clog2(N)-1:0]    cfg_array, rd_array;
  logic [ROW_AW-1:0]       cfg_row, rd_row;
  logic [NMAX-1:0]         cfg_data, rd_data;
  logic                    tbl_we, tbl_sel;
  logic [$clog2(N)-1:0]    tbl_node;
  logic [$clog2(NT+1)-1:0] tbl_step;
  logic [$clog2(NMAX)-1:0] tbl_slot, tbl_addr;
  logic                    route_busy, compute_busy;

  snn_cram_top #(
    .N(N), .NMAX(NMAX), .S(S), .LF(LF), .ROWS(ROWS), .NOISE_W(NOISE_W), .DEPTH(4096)
  ) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // column enables of every array, to count delay-gated lanes
  logic [NMAX-1:0] en_mon [N];
  for (genvar g = 0; g < N; g++) begin : g_mon
    assign en_mon[g] = dut.g_neuron[g].u_array.col_en;
  end

  // ---------------- reference state ----------------
  cram_map_t        mp;
  logic [S-1:0]     w    [N][NMAX];
  logic [S-1:0]     dl   [N][NMAX];
  logic [S-1:0]     dcnt [N][NMAX];
  logic [S-1:0]     alpha[N][LF];
  logic [NMAX-1:0]  hist [N][LF];
  int unsigned      bias [N], theta [N], kv [N], v [N];
  logic [8:0]       lfsr [N];
  logic [N-1:0]     spk;
  bit               tsel [N][NT][NMAX];
  int               taddr[N][NT][NMAX];
  int               src  [N][NMAX];

  // mechanism counters
  int n_concat = 0, n_select = 0, n_disabled = 0, n_spike = 0, n_reset = 0;
  int n_leak = 0, n_noise = 0;

  task automatic cfg_write(input int a, input int r, input logic [NMAX-1:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_array = $clog2(N)'(a); cfg_row = ROW_AW'(r); cfg_data = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // Which neuron's spike each slot of each node holds after routing,
  // found by following the graph's edges step by step.
  task automatic route_ref();
    int cur [N][NMAX];
    int nxt [N][NMAX];
    int pa [N], pb [N];
    for (int vv = 0; vv < N; vv++) begin pa[vv] = -1; pb[vv] = -1; end
    for (int u = 0; u < N; u++) begin
      int t0, t1;
      t0 = (2 * u) % N; t1 = (2 * u + 1) % N;
      if (pa[t0] < 0) pa[t0] = u; else pb[t0] = u;
      if (pa[t1] < 0) pa[t1] = u; else pb[t1] = u;
    end
    for (int vv = 0; vv < N; vv++)
      for (int p = 0; p < NMAX; p++) cur[vv][p] = (p == 0) ? vv : -1;
    for (int c = 1; c <= LOGN; c++) begin
      for (int vv = 0; vv < N; vv++)
        for (int p = 0; p < NMAX; p++) begin
          int len;
          len = 1 << (c - 1);
          if (c <= KMAX)
            nxt[vv][p] = (p < len) ? cur[pa[vv]][p] : (p < 2 * len) ? cur[pb[vv]][p - len] : -1;
          else
            nxt[vv][p] = tsel[vv][c - KMAX - 1][p] ? cur[pb[vv]][taddr[vv][c - KMAX - 1][p]]
                                                   : cur[pa[vv]][taddr[vv][c - KMAX - 1][p]];
        end
      cur = nxt;
    end
    src = cur;
  endtask

  function automatic logic [8:0] lfsr_next(input logic [8:0] b);
    return {b[7:0], b[4] ^ b[8]};
  endfunction

  // One reference time step for all neurons.
  task automatic ref_step();
    logic [N-1:0] nspk;
    longint vmask;
    vmask = (64'd1 << mp.vw) - 1;
    for (int i = 0; i < N; i++) begin
      logic [NMAX-1:0] train;
      longint sum, u, lk, vn;
      int r1, r2;
      for (int l = 0; l < NMAX; l++) train[l] = (src[i][l] >= 0) ? spk[src[i][l]] : 1'b0;
      for (int k = LF - 1; k >= 1; k--) hist[i][k] = hist[i][k - 1];
      hist[i][0] = train;
      sum = 0;
      for (int l = 0; l < NMAX; l++) begin
        logic [S-1:0] x;
        bit en;
        longint conv, pr;
        x = dcnt[i][l] + 1'b1;
        en = (x == dl[i][l]);
        dcnt[i][l] = en ? '0 : x;
        conv = 0;
        for (int k = 0; k < LF; k++) if (hist[i][k][l]) conv += longint'(alpha[i][k]);
        if (LF > 1) conv = (conv + LF / 2) >> $clog2(LF);
        pr = (conv * longint'(w[i][l]) + (64'd1 << (S - 1))) >> S;
        if (en) sum += pr;
      end
      u = (sum + bias[i]) & vmask;
      lfsr[i] = lfsr_next(lfsr[i]);
      r1 = int'(lfsr[i][NOISE_W-1:0]);
      u = (u + r1) & vmask;
      lk = (longint'(v[i]) * kv[i] + (64'd1 << (S - 1))) >> S;
      if (lk != 0) n_leak++;
      vn = (u + lk) & vmask;
      lfsr[i] = lfsr_next(lfsr[i]);
      r2 = int'(lfsr[i][NOISE_W-1:0]);
      if (r1 != 0 || r2 != 0) n_noise++;
      vn = (vn + r2) & vmask;
      nspk[i] = (vn >= theta[i]);
      if (nspk[i]) begin
        n_spike++;
        if (vn != 0) n_reset++;
        v[i] = 0;
      end else begin
        v[i] = int'(vn);
      end
    end
    spk = nspk;
  endtask

  function automatic logic [NMAX-1:0] bcast(input int value, input int bitpos);
    return ((value >> bitpos) & 1) != 0 ? '1 : '0;
  endfunction

  initial begin
    instr_t q[$];
    int cyc_route, cyc_comp;
    logic [NMAX-1:0] row;
    mp = lif_map(S, LF, NMAX, NOISE_W);
    gen_lif(q, S, LF, NMAX, NOISE_W);
    step_start = 0; cfg_we = 0; cfg_array = '0; cfg_row = '0; cfg_data = '0;
    rd_array = '0; rd_row = '0; tbl_we = 0; tbl_sel = 0; tbl_node = '0; tbl_step = '0;
    tbl_slot = '0; tbl_addr = '0;
    if (mp.total > ROWS) begin
      failures++;
      $display("layout needs %0d rows", mp.total);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // router selection tables
    for (int i = 0; i < N; i++)
      for (int c = 0; c < NT; c++)
        for (int p = 0; p < NMAX; p++) begin
          tsel[i][c][p]  = 1'($urandom);
          taddr[i][c][p] = $urandom_range(0, NMAX - 1);
          if (LOGN > KMAX) begin
            @(negedge clk);
            tbl_we = 1; tbl_node = $clog2(N)'(i); tbl_step = $clog2(NT+1)'(c);
            tbl_slot = $clog2(NMAX)'(p); tbl_sel = tsel[i][c][p];
            tbl_addr = $clog2(NMAX)'(taddr[i][c][p]);
          end
        end
    @(negedge clk);
    tbl_we = 0;

    // neuron parameters
    for (int i = 0; i < N; i++) begin
      for (int l = 0; l < NMAX; l++) begin
        w[i][l] = S'($urandom); dl[i][l] = S'($urandom); dcnt[i][l] = '0;
      end
      for (int k = 0; k < LF; k++) begin
        alpha[i][k] = S'($urandom);
        hist[i][k] = '0;
      end
      bias[i]  = $urandom_range(0, 12);
      theta[i] = $urandom_range(4, 40);
      kv[i]    = $urandom_range(0, (1 << S) - 1);
      v[i]     = 0;
      lfsr[i]  = 9'($urandom_range(1, 511));
      for (int k = 0; k < LF; k++) cfg_write(i, mp.h + k, '0);
      for (int k = 0; k < LF; k++)
        for (int b = 0; b < S; b++) cfg_write(i, mp.alpha + k * S + b, bcast(alpha[i][k], b));
      for (int b = 0; b < S; b++) begin
        for (int l = 0; l < NMAX; l++) row[l] = w[i][l][b];
        cfg_write(i, mp.w + b, row);
        for (int l = 0; l < NMAX; l++) row[l] = dl[i][l][b];
        cfg_write(i, mp.d + b, row);
        cfg_write(i, mp.dcnt + b, '0);
        cfg_write(i, mp.kv + b, bcast(kv[i], b));
      end
      for (int b = 0; b < mp.vw; b++) begin
        cfg_write(i, mp.bias + b, bcast(bias[i], b));
        cfg_write(i, mp.theta + b, bcast(theta[i], b));
        cfg_write(i, mp.v + b, '0);
      end
      for (int b = 0; b < 9; b++) cfg_write(i, mp.lfsr + b, bcast(int'(lfsr[i]), b));
    end
    spk = '0;
    route_ref();

    for (int t = 0; t < T; t++) begin
      @(negedge clk);
      step_start = 1;
      @(negedge clk);
      step_start = 0;
      cyc_route = 0; cyc_comp = 0;
      while (!step_done) begin
        if (route_busy) begin
          cyc_route++;
          if (32'(dut.u_net.step) > KMAX) n_select++; else n_concat++;
        end
        if (compute_busy) cyc_comp++;
        @(negedge clk);
      end
      checks += 2;
      if (cyc_route != LOGN) begin failures++; $display("routing took %0d cycles", cyc_route); end
      if (cyc_comp != q.size()) begin
        failures++;
        $display("compute took %0d cycles for %0d words", cyc_comp, q.size());
      end
      for (int i = 0; i < N; i++)
        for (int l = 0; l < NMAX; l++) if (!en_mon[i][l]) n_disabled++;
      ref_step();
      for (int i = 0; i < N; i++) begin
        int vd;
        checks++;
        if (spikes[i] !== spk[i]) begin
          failures++;
          if (failures < 20) $display("t=%0d neuron %0d spike %b expected %b", t, i, spikes[i], spk[i]);
        end
        vd = 0;
        rd_array = $clog2(N)'(i);
        for (int b = 0; b < mp.vw; b++) begin
          rd_row = ROW_AW'(mp.v + b);
          #1;
          vd |= int'(rd_data[0]) << b;
        end
        checks++;
        if (vd != int'(v[i])) begin
          failures++;
          if (failures < 20) $display("t=%0d neuron %0d v=%0d expected %0d", t, i, vd, v[i]);
        end
      end
    end
    $display("mechanisms: concat steps %0d, select steps %0d, disabled lanes %0d, spikes %0d, resets %0d, leak %0d, noise %0d",
             n_concat, n_select, n_disabled, n_spike, n_reset, n_leak, n_noise);
    checks += 7;
    if (n_concat == 0) failures++;
    if (n_select == 0 && LOGN > KMAX) failures++;
    if (n_disabled == 0) failures++;
    if (n_spike == 0) failures++;
    if (n_reset == 0) failures++;
    if (n_leak == 0) failures++;
    if (n_noise == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
