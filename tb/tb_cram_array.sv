// tb_cram_array: self-checking test of the CRAM array model.
//
// Runs a long random sequence of broadcast instructions (presets, every
// gate, masked and unmasked, lane shifts, column-enable loads, spike writes
// and reads) on a small array and keeps a shadow copy of the cells. The
// shadow applies each gate by counting, lane by lane, how many inputs hold
// a one and switching the output away from its preset value when the gate's
// threshold is met; the whole array is compared through the host port every
// few instructions. Directed cases check full-adder and NAND truth tables.
module tb_cram_array;
  import cram_pkg::*;

  localparam int R = 32;
  localparam int C = 16;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          instr_valid;
  instr_t        instr;
  logic [C-1:0]  spike_in;
  logic          spike_out;
  logic          host_we;
  logic [ROW_AW-1:0] host_row, host_rrow;
  logic [C-1:0]  host_wdata, host_rdata, col_en;

  logic [C-1:0]  shadow [R];
  logic [C-1:0]  en_s;
  logic          spk_s;
  int            checks = 0, failures = 0;

  cram_array #(.ROWS(R), .COLS(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(input int r, input logic [C-1:0] d);
    @(negedge clk);
    host_we = 1'b1; host_row = ROW_AW'(r); host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
    shadow[r] = d;
  endtask

  task automatic compare_all();
    for (int r = 0; r < R; r++) begin
      host_rrow = ROW_AW'(r);
      #1;
      checks++;
      if (host_rdata !== shadow[r]) begin
        failures++;
        if (failures < 10) $display("row %0d: got %h expected %h", r, host_rdata, shadow[r]);
      end
    end
    checks++;
    if (col_en !== en_s || spike_out !== spk_s) begin
      failures++;
      $display("col_en %h/%h spike %b/%b", col_en, en_s, spike_out, spk_s);
    end
  endtask

  function automatic int n_inputs(input op_e op);
    case (op)
      OP_INV, OP_INV2, OP_COPY: return 1;
      OP_MAJ3: return 3;
      OP_MAJ5: return 5;
      default: return 2;
    endcase
  endfunction

  function automatic bit switches(input op_e op, input int cnt);
    case (op)
      OP_NAND2, OP_AND2: return cnt < 2;
      OP_MAJ3: return cnt >= 2;
      OP_MAJ5: return cnt >= 3;
      default: return cnt >= 1;
    endcase
  endfunction

  function automatic bit preset_of(input op_e op);
    return op inside {OP_AND2, OP_NOR2, OP_INV, OP_INV2};
  endfunction

  // Issue one instruction and update the shadow copy.
  task automatic issue(input instr_t i, input logic [C-1:0] spk);
    logic [C-1:0] nxt [R];
    int ins [5];
    nxt = shadow;
    ins = '{int'(i.a), int'(i.b), int'(i.c), int'(i.d), int'(i.e)};
    case (i.op)
      OP_PRESET0, OP_PRESET1:
        for (int r = int'(i.o0); r <= int'(i.o1); r++)
          for (int l = 0; l < C; l++)
            if (!i.masked || en_s[l]) nxt[r][l] = (i.op == OP_PRESET1);
      OP_LSHIFT: nxt[i.o0] = shadow[i.a] >> (1 << i.b);
      OP_WRSPK:  nxt[i.o0] = spk;
      OP_LOADEN, OP_RDSPK, OP_NOP, OP_END: ;
      default: begin
        for (int l = 0; l < C; l++) begin
          int cnt;
          cnt = 0;
          for (int k = 0; k < n_inputs(i.op); k++) cnt += int'(shadow[ins[k]][l]);
          if ((!i.masked || en_s[l]) && switches(i.op, cnt)) begin
            nxt[i.o0][l] = !preset_of(i.op);
            if (i.op == OP_INV2) nxt[i.o1][l] = !preset_of(i.op);
          end
        end
      end
    endcase
    if (i.op == OP_LOADEN) en_s = shadow[i.a];
    if (i.op == OP_RDSPK)  spk_s = shadow[i.a][0];
    @(negedge clk);
    instr = i; instr_valid = 1'b1; spike_in = spk;
    @(negedge clk);
    instr_valid = 1'b0;
    shadow = nxt;
  endtask

  function automatic instr_t mk(input op_e op, input int o0, input int o1, input int a,
                                input int b, input int c, input int d, input int e, input bit m);
    instr_t i;
    i.op = op; i.masked = m;
    i.o0 = row_t'(o0); i.o1 = row_t'(o1);
    i.a = row_t'(a); i.b = row_t'(b); i.c = row_t'(c); i.d = row_t'(d); i.e = row_t'(e);
    return i;
  endfunction

  initial begin
    instr_t i;
    op_e    ops [13];
    logic [C-1:0] exp_row;
    ops = '{OP_PRESET0, OP_PRESET1, OP_NAND2, OP_AND2, OP_OR2, OP_NOR2, OP_INV, OP_INV2,
            OP_COPY, OP_MAJ3, OP_MAJ5, OP_LSHIFT, OP_LOADEN};
    instr_valid = 1'b0; host_we = 1'b0; host_row = '0; host_rrow = '0;
    host_wdata = '0; spike_in = '0; instr = '0;
    en_s = '1; spk_s = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < R; r++) host_write(r, C'($urandom));
    compare_all();

    // Directed: full adder in every lane over all 8 input combinations.
    // Rows 0,1,2 hold a,b,cin with lane l = combination l mod 8.
    for (int l = 0; l < C; l++) begin
      shadow[0][l] = l[0]; shadow[1][l] = l[1]; shadow[2][l] = l[2];
    end
    host_write(0, shadow[0]); host_write(1, shadow[1]); host_write(2, shadow[2]);
    issue(mk(OP_PRESET0, 3, 3, 0, 0, 0, 0, 0, 0), '0);
    issue(mk(OP_MAJ3, 3, 0, 0, 1, 2, 0, 0, 0), '0);
    issue(mk(OP_PRESET1, 4, 5, 0, 0, 0, 0, 0, 0), '0);
    issue(mk(OP_INV2, 4, 5, 3, 0, 0, 0, 0, 0), '0);
    issue(mk(OP_PRESET0, 6, 6, 0, 0, 0, 0, 0, 0), '0);
    issue(mk(OP_MAJ5, 6, 0, 0, 1, 2, 4, 5, 0), '0);
    for (int l = 0; l < C; l++) begin
      int sum;
      sum = l[0] + l[1] + l[2];
      host_rrow = ROW_AW'(6); #1;
      checks++;
      if (host_rdata[l] !== sum[0]) begin failures++; $display("FA sum lane %0d", l); end
      host_rrow = ROW_AW'(3); #1;
      checks++;
      if (host_rdata[l] !== sum[1]) begin failures++; $display("FA carry lane %0d", l); end
    end
    // Directed: NAND after preset, and a NAND whose output was not preset.
    issue(mk(OP_PRESET0, 7, 7, 0, 0, 0, 0, 0, 0), '0);
    issue(mk(OP_NAND2, 7, 0, 0, 1, 0, 0, 0, 0), '0);
    exp_row = ~(shadow[0] & shadow[1]);
    host_rrow = ROW_AW'(7); #1;
    checks++;
    if (host_rdata !== exp_row) begin failures++; $display("NAND row %h", host_rdata); end
    issue(mk(OP_PRESET1, 8, 8, 0, 0, 0, 0, 0, 0), '0);
    issue(mk(OP_NAND2, 8, 0, 0, 1, 0, 0, 0, 0), '0);
    host_rrow = ROW_AW'(8); #1;
    checks++;
    if (host_rdata !== '1) begin failures++; $display("unpreset NAND row %h", host_rdata); end
    compare_all();

    // Random instruction stream.
    for (int n = 0; n < 3000; n++) begin
      op_e op;
      int  o0, len;
      int  pick;
      pick = $urandom_range(0, 15);
      if (pick < 13)       op = ops[pick];
      else if (pick == 13) op = OP_WRSPK;
      else                 op = OP_RDSPK;
      o0  = $urandom_range(0, R - 1);
      len = $urandom_range(0, 7);
      if (o0 + len >= R) len = R - 1 - o0;
      i = mk(op, o0,
             (op == OP_PRESET0 || op == OP_PRESET1) ? o0 + len : $urandom_range(0, R - 1),
             $urandom_range(0, R - 1),
             (op == OP_LSHIFT) ? $urandom_range(0, 3) : $urandom_range(0, R - 1),
             $urandom_range(0, R - 1), $urandom_range(0, R - 1), $urandom_range(0, R - 1),
             1'($urandom));
      if (op == OP_INV2 && i.o1 == i.o0) i.o1 = row_t'((o0 + 1) % R);
      issue(i, C'($urandom));
      if (n % 20 == 19) compare_all();
    end
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
