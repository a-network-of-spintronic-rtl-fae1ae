// cram_ucode_pkg: builds the programs that the controller array broadcasts
// to the CRAM arrays, and the row layout they assume.
//
// In this design nothing outside the arrays computes: every arithmetic step
// of the neuron is a sequence of presets and gates, one per cycle, applied to
// all lanes of every array at once. The routines below expand arithmetic
// into such sequences:
//   * full_adder: the three-gate CRAM full adder, cout = MAJ3(a,b,cin),
//     two copies of ~cout by one INV1-2, sum = MAJ5(a,b,cin,~cout,~cout),
//   * add: ripple-carry chain of full adders, any width, operands may be
//     rows, constants or shifted rows,
//   * mul: shift-and-add multiplier, AND gates for partial products and the
//     full-adder chain for their sum (Figure 7's 2x2 case is one instance),
//   * xor2: four NAND gates,
//   * lfsr_step: one step of the 9-bit LFSR with polynomial x^9 + x^5 + 1:
//     an XOR of b5 and b9 by four NANDs into t, then nine COPY gates that
//     shift b1..b8 into b2..b9 and t into b1 (13 gates, plus presets).
// gen_lif emits one leaky integrate-and-fire time step (synaptic delay,
// spike history, filter convolution, weighting, reduction tree over lanes,
// bias, leak, noise, threshold and reset). gen_test emits a short
// arithmetic self-test.
//
// Number formats are this design's choice: all values are unsigned; a
// product of an A-bit value and an S-bit value is rounded back to A bits as
// (a*b + 2**(S-1)) >> S; the filter sum of LF values is rounded to S bits as
// (sum + LF/2) >> log2(LF); the reduction tree keeps every carry, so the sum
// over lanes is exact; the membrane potential wraps modulo 2**VW.
package cram_ucode_pkg;
  import cram_pkg::*;

  localparam int unsigned PRESET_MAX = 8;   // must match cram_array
  localparam int unsigned LFSR_BITS  = 9;

  // Row layout of an array. Single rows and the first row of multi-row
  // fields; widths are given alongside.
  typedef struct {
    int s, lf, log_lf, kmax, cw, sw, vw, xw, noise_w;
    int zero, one;
    int h;        // spike history, LF rows, h+0 is the newest train
    int alpha;    // filter lookup table, LF entries of S bits (entry s bit i at alpha+s*S+i)
    int w;        // synaptic weights, S rows
    int d;        // synaptic delays, S rows
    int dcnt;     // local delay counters, S rows
    int en;       // column enable computed from the delay compare
    int bias;     // bias b_i, VW rows (lane 0)
    int theta;    // threshold, VW rows (lane 0)
    int kv;       // leak factor, S rows
    int v;        // membrane potential, VW rows (lane 0)
    int lfsr;     // b1..b9 at lfsr+0..lfsr+8
    int lt;       // LFSR ancillary cells a0,a1,a2 and t
    int ca, cb, n1, t1, spk;
    int x, y, z, u, r;   // scratch buffers, XW rows each
    int ta, tb, tsum, tprod, txor;  // self-test fields
    int total;
  } cram_map_t;

  typedef struct {
    int  base;
    int  width;
    int  shift;
    bit  is_const;
    longint k;
  } opnd_t;

  function automatic int imax(input int a, input int b);
    return (a > b) ? a : b;
  endfunction

  function automatic cram_map_t lif_map(input int s, input int lf, input int nmax, input int noise_w);
    cram_map_t m;
    m = '{default: 0};
    m.s = s; m.lf = lf; m.noise_w = noise_w;
    m.log_lf = int'(clog2i(lf));
    m.kmax   = int'(clog2i(nmax));
    m.cw = s + m.log_lf;
    m.sw = s + m.kmax;
    m.vw = m.sw + 2;
    m.xw = imax(imax(m.cw, 2 * s), m.vw + s) + 1;
    m.zero  = 0;
    m.one   = 1;
    m.h     = 2;
    m.alpha = m.h + lf;
    m.w     = m.alpha + lf * s;
    m.d     = m.w + s;
    m.dcnt  = m.d + s;
    m.en    = m.dcnt + s;
    m.bias  = m.en + 1;
    m.theta = m.bias + m.vw;
    m.kv    = m.theta + m.vw;
    m.v     = m.kv + s;
    m.lfsr  = m.v + m.vw;
    m.lt    = m.lfsr + LFSR_BITS;
    m.ca    = m.lt + 4;
    m.cb    = m.ca + 1;
    m.n1    = m.cb + 1;      // n1 and n1+1
    m.t1    = m.n1 + 2;
    m.spk   = m.t1 + 1;
    m.x     = m.spk + 1;
    m.y     = m.x + m.xw;
    m.z     = m.y + m.xw;
    m.u     = m.z + m.xw;
    m.r     = m.u + m.xw;
    m.total = m.r + m.xw;
    return m;
  endfunction

  // Self-test layout: 4-bit operands A and B in every lane.
  function automatic cram_map_t test_map();
    cram_map_t m;
    m = '{default: 0};
    m.zero = 0; m.one = 1;
    m.ta = 2;  m.tb = 6;  m.tsum = 10; m.tprod = 15; m.txor = 23;
    m.lfsr = 24; m.lt = 33;
    m.ca = 37; m.cb = 38; m.n1 = 39; m.t1 = 41; m.spk = 42;
    m.xw = 9;
    m.x = 43; m.y = 52; m.z = 61; m.u = 70; m.r = 79;
    m.total = 88;
    return m;
  endfunction

  function automatic opnd_t rows(input int base, input int width, input int shift = 0);
    opnd_t o;
    o.base = base; o.width = width; o.shift = shift; o.is_const = 1'b0; o.k = 0;
    return o;
  endfunction

  function automatic opnd_t konst(input longint k);
    opnd_t o;
    o.base = 0; o.width = 64; o.shift = 0; o.is_const = 1'b1; o.k = k;
    return o;
  endfunction

  function automatic int row_of(input cram_map_t m, input opnd_t o, input int i);
    int idx;
    if (o.is_const) return ((o.k >> i) & 1) != 0 ? m.one : m.zero;
    idx = i - o.shift;
    if (idx < 0 || idx >= o.width) return m.zero;
    return o.base + idx;
  endfunction

  function automatic void emit(ref instr_t q[$], input op_e op, input int o0, input int o1,
                               input int a, input int b, input int c, input int d, input int e,
                               input bit m);
    instr_t i;
    i.op = op; i.masked = m;
    i.o0 = row_t'(o0); i.o1 = row_t'(o1);
    i.a = row_t'(a); i.b = row_t'(b); i.c = row_t'(c); i.d = row_t'(d); i.e = row_t'(e);
    q.push_back(i);
  endfunction

  // Bulk preset of rows r0..r1, split into PRESET_MAX chunks.
  function automatic void preset(ref instr_t q[$], input int r0, input int r1, input bit val,
                                 input bit m);
    for (int r = r0; r <= r1; r += PRESET_MAX)
      emit(q, val ? OP_PRESET1 : OP_PRESET0, r, (r + PRESET_MAX - 1 < r1) ? r + PRESET_MAX - 1 : r1,
           0, 0, 0, 0, 0, m);
  endfunction

  function automatic bit gate_preset(input op_e op);
    return (op == OP_AND2 || op == OP_NOR2 || op == OP_INV || op == OP_INV2);
  endfunction

  // Preset the output, then apply the gate.
  function automatic void gate(ref instr_t q[$], input op_e op, input int out, input int a,
                               input int b, input bit m);
    preset(q, out, out, gate_preset(op), m);
    emit(q, op, out, out, a, b, 0, 0, 0, m);
  endfunction

  function automatic void xor2(ref instr_t q[$], input cram_map_t mp, input int out, input int a,
                               input int b, input bit m);
    preset(q, mp.lt, mp.lt + 2, 1'b0, m);
    emit(q, OP_NAND2, mp.lt,     0, a,     b,         0, 0, 0, m);
    emit(q, OP_NAND2, mp.lt + 1, 0, a,     mp.lt,     0, 0, 0, m);
    emit(q, OP_NAND2, mp.lt + 2, 0, b,     mp.lt,     0, 0, 0, m);
    gate(q, OP_NAND2, out, mp.lt + 1, mp.lt + 2, m);
  endfunction

  function automatic void full_adder(ref instr_t q[$], input cram_map_t mp, input int s,
                                     input int co, input int a, input int b, input int ci,
                                     input bit m);
    preset(q, co, co, 1'b0, m);
    emit(q, OP_MAJ3, co, 0, a, b, ci, 0, 0, m);
    preset(q, mp.n1, mp.n1 + 1, 1'b1, m);
    emit(q, OP_INV2, mp.n1, mp.n1 + 1, co, 0, 0, 0, 0, m);
    preset(q, s, s, 1'b0, m);
    emit(q, OP_MAJ5, s, 0, a, b, ci, mp.n1, mp.n1 + 1, m);
  endfunction

  // dst[n-1:0] = a + b + cin. dst must not overlap a or b. Returns the row
  // that holds the carry out (ca or cb).
  function automatic int add(ref instr_t q[$], input cram_map_t mp, input int dst, input int n,
                             input opnd_t a, input opnd_t b, input int cin, input bit m);
    int ci, co;
    ci = cin;
    co = mp.ca;
    for (int i = 0; i < n; i++) begin
      co = (ci == mp.ca) ? mp.cb : mp.ca;
      full_adder(q, mp, dst + i, co, row_of(mp, a, i), row_of(mp, b, i), ci, m);
      ci = co;
    end
    return ci;
  endfunction

  // Product of a (wa bits) and b (wb bits), wa+wb bits, built in scratch
  // buffers x and y with partial products in z. Returns the base row of the
  // buffer holding the product.
  function automatic int mul(ref instr_t q[$], input cram_map_t mp, input opnd_t a,
                             input opnd_t b, input bit m);
    int cur, oth, tmp, nd, unused;
    nd  = a.width + b.width;
    cur = mp.x;
    oth = mp.y;
    preset(q, cur, cur + nd - 1, 1'b0, m);
    for (int i = 0; i < b.width; i++) begin
      for (int j = 0; j < a.width; j++)
        gate(q, OP_AND2, mp.z + j, row_of(mp, a, j), row_of(mp, b, i), m);
      unused = add(q, mp, oth, nd, rows(cur, nd), rows(mp.z, a.width, i), mp.zero, m);
      tmp = cur; cur = oth; oth = tmp;
    end
    return cur;
  endfunction

  // (a*b + 2**(wb-1)) >> wb, wa bits. Returns the base row of the result.
  function automatic int mul_round(ref instr_t q[$], input cram_map_t mp, input opnd_t a,
                                   input opnd_t b, input bit m);
    int p, o, nd, unused;
    nd = a.width + b.width;
    p  = mul(q, mp, a, b, m);
    o  = (p == mp.x) ? mp.y : mp.x;
    unused = add(q, mp, o, nd, rows(p, nd), konst(64'(1) << (b.width - 1)), mp.zero, m);
    return o + b.width;
  endfunction

  function automatic void lfsr_step(ref instr_t q[$], input cram_map_t mp);
    int t;
    t = mp.lt + 3;
    xor2(q, mp, t, mp.lfsr + 4, mp.lfsr + 8, 1'b0);          // t = b5 ^ b9
    for (int k = 8; k >= 1; k--)
      gate(q, OP_COPY, mp.lfsr + k, mp.lfsr + k - 1, 0, 1'b0); // b(k+1) = b(k)
    gate(q, OP_COPY, mp.lfsr, t, 0, 1'b0);                     // b1 = t
  endfunction

  // One leaky integrate-and-fire time step.
  function automatic void gen_lif(ref instr_t q[$], input int s, input int lf, input int nmax,
                                  input int noise_w);
    cram_map_t mp;
    int cur, oth, tmp, c, pr, lk, w;
    mp = lif_map(s, lf, nmax, noise_w);
    q.delete();
    preset(q, mp.zero, mp.zero, 1'b0, 1'b0);
    preset(q, mp.one,  mp.one,  1'b1, 1'b0);

    // Synaptic delay: dcnt+1, compare with d, clear on match, enable lanes.
    c = add(q, mp, mp.x, s, rows(mp.dcnt, s), konst(1), mp.zero, 1'b0);
    for (int i = 0; i < s; i++) xor2(q, mp, mp.z + i, mp.x + i, mp.d + i, 1'b0);
    gate(q, OP_COPY, mp.r, mp.z, 0, 1'b0);
    for (int i = 1; i < s; i++) gate(q, OP_OR2, mp.r + i, mp.r + i - 1, mp.z + i, 1'b0);
    gate(q, OP_INV, mp.en, mp.r + s - 1, 0, 1'b0);
    gate(q, OP_INV, mp.t1, mp.en, 0, 1'b0);
    for (int i = 0; i < s; i++) gate(q, OP_AND2, mp.dcnt + i, mp.x + i, mp.t1, 1'b0);
    emit(q, OP_LOADEN, 0, 0, mp.en, 0, 0, 0, 0, 1'b0);

    // Spike history: age every train by one step, write the new one.
    for (int k = lf - 1; k >= 1; k--) gate(q, OP_COPY, mp.h + k, mp.h + k - 1, 0, 1'b0);
    emit(q, OP_WRSPK, mp.h, 0, 0, 0, 0, 0, 0, 1'b0);

    // Filter: sum over s of alpha(s) AND spike(t-s), enabled lanes only.
    cur = mp.x; oth = mp.y;
    preset(q, cur, cur + mp.cw - 1, 1'b0, 1'b1);
    for (int k = 0; k < lf; k++) begin
      for (int i = 0; i < s; i++) gate(q, OP_AND2, mp.z + i, mp.alpha + k * s + i, mp.h + k, 1'b1);
      c = add(q, mp, oth, mp.cw, rows(cur, mp.cw), rows(mp.z, s), mp.zero, 1'b1);
      tmp = cur; cur = oth; oth = tmp;
    end
    if (mp.log_lf > 0) begin
      c = add(q, mp, oth, mp.cw, rows(cur, mp.cw), konst(64'(1) << (mp.log_lf - 1)), mp.zero, 1'b1);
      cur = oth;
    end
    for (int i = 0; i < s; i++) gate(q, OP_COPY, mp.r + i, cur + mp.log_lf + i, 0, 1'b1);

    // Weighting, then zero the lanes that are not enabled.
    pr = mul_round(q, mp, rows(mp.r, s), rows(mp.w, s), 1'b1);
    for (int i = 0; i < s; i++) gate(q, OP_AND2, mp.z + i, pr + i, mp.en, 1'b0);

    // Reduction tree over lanes: log2(NMAX) levels of shift and add.
    cur = mp.x; oth = mp.y;
    for (int i = 0; i < s; i++) gate(q, OP_COPY, cur + i, mp.z + i, 0, 1'b0);
    for (int k = 0; k < mp.kmax; k++) begin
      w = s + k;
      for (int i = 0; i < w; i++) emit(q, OP_LSHIFT, mp.u + i, 0, cur + i, k, 0, 0, 0, 1'b0);
      c = add(q, mp, oth, w + 1, rows(cur, w), rows(mp.u, w), mp.zero, 1'b0);
      tmp = cur; cur = oth; oth = tmp;
    end

    // Synaptic response current u = sum + bias + noise.
    c = add(q, mp, mp.u, mp.vw, rows(cur, mp.sw), rows(mp.bias, mp.vw), mp.zero, 1'b0);
    lfsr_step(q, mp);
    c = add(q, mp, mp.r, mp.vw, rows(mp.u, mp.vw), rows(mp.lfsr, noise_w), mp.zero, 1'b0);

    // Membrane potential v = u + leak(v_old) + noise.
    lk = mul_round(q, mp, rows(mp.v, mp.vw), rows(mp.kv, s), 1'b0);
    c = add(q, mp, mp.u, mp.vw, rows(mp.r, mp.vw), rows(lk, mp.vw), mp.zero, 1'b0);
    lfsr_step(q, mp);
    c = add(q, mp, mp.z, mp.vw, rows(mp.u, mp.vw), rows(mp.lfsr, noise_w), mp.zero, 1'b0);

    // Threshold: v - theta without borrow means v >= theta.
    for (int i = 0; i < mp.vw; i++) gate(q, OP_INV, mp.x + i, mp.theta + i, 0, 1'b0);
    c = add(q, mp, mp.y, mp.vw, rows(mp.z, mp.vw), rows(mp.x, mp.vw), mp.one, 1'b0);
    gate(q, OP_COPY, mp.spk, c, 0, 1'b0);

    // Reset: v = v AND NOT spike.
    gate(q, OP_INV, mp.t1, mp.spk, 0, 1'b0);
    for (int i = 0; i < mp.vw; i++) gate(q, OP_AND2, mp.v + i, mp.z + i, mp.t1, 1'b0);
    emit(q, OP_RDSPK, 0, 0, mp.spk, 0, 0, 0, 0, 1'b0);
    emit(q, OP_END, 0, 0, 0, 0, 0, 0, 0, 1'b0);
  endfunction

  // Self-test: in every lane, sum = A + B (5 bits), prod = A * B (8 bits),
  // xor = A0 ^ B0, then one LFSR step.
  function automatic void gen_test(ref instr_t q[$]);
    cram_map_t mp;
    int c, p;
    mp = test_map();
    q.delete();
    preset(q, mp.zero, mp.zero, 1'b0, 1'b0);
    preset(q, mp.one,  mp.one,  1'b1, 1'b0);
    c = add(q, mp, mp.tsum, 4, rows(mp.ta, 4), rows(mp.tb, 4), mp.zero, 1'b0);
    gate(q, OP_COPY, mp.tsum + 4, c, 0, 1'b0);
    p = mul(q, mp, rows(mp.ta, 4), rows(mp.tb, 4), 1'b0);
    for (int i = 0; i < 8; i++) gate(q, OP_COPY, mp.tprod + i, p + i, 0, 1'b0);
    xor2(q, mp, mp.txor, mp.ta, mp.tb, 1'b0);
    lfsr_step(q, mp);
    emit(q, OP_END, 0, 0, 0, 0, 0, 0, 0, 1'b0);
  endfunction

endpackage
