// tb_cram_controller: runs the controller array's self-test program on a
// small CRAM array and checks the in-memory arithmetic it drives.
//
// Every lane of the array gets random 4-bit operands A and B and a random
// 9-bit LFSR state. After one run of the program the testbench reads back,
// lane by lane, A + B (ripple chain of three-gate full adders), A * B
// (AND partial products plus full adders), A0 XOR B0 (four NANDs) and the
// next LFSR state for x^9 + x^5 + 1, and compares them with values computed
// here. It also checks that the program issues one word per cycle, that
// done follows the last word, and that one LFSR step uses 13 gates.
module tb_cram_controller;
  import cram_pkg::*;
  import cram_ucode_pkg::*;

  localparam int R = 128;
  localparam int C = 16;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start, busy, done, instr_valid;
  instr_t        instr;
  logic [12:0]   pc;
  logic          host_we;
  logic [ROW_AW-1:0] host_row, host_rrow;
  logic [C-1:0]  host_wdata, host_rdata, col_en;
  logic          spike_out;
  int            checks = 0, failures = 0;

  cram_controller #(.PROG(PROG_TEST)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .instr_valid, .instr, .pc
  );

  cram_array #(.ROWS(R), .COLS(C)) u_arr (
    .clk, .rst_n, .instr_valid, .instr, .spike_in('0), .spike_out,
    .host_we, .host_row, .host_wdata, .host_rrow, .host_rdata, .col_en
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(input int r, input logic [C-1:0] d);
    @(negedge clk);
    host_we = 1'b1; host_row = ROW_AW'(r); host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic read_row(input int r, output logic [C-1:0] d);
    host_rrow = ROW_AW'(r);
    #1;
    d = host_rdata;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    cram_map_t mp;
    instr_t q[$];
    logic [3:0] a [C], b [C];
    logic [8:0] lf [C];
    logic [C-1:0] row;
    int cycles, gates;

    mp = test_map();
    start = 1'b0; host_we = 1'b0; host_row = '0; host_rrow = '0; host_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // one LFSR step is 13 gates (4 NAND + 9 COPY) besides presets
    lfsr_step(q, mp);
    gates = 0;
    foreach (q[k]) if (!(q[k].op inside {OP_PRESET0, OP_PRESET1})) gates++;
    check(gates == 13, $sformatf("LFSR step uses %0d gates", gates));
    gen_test(q);

    for (int run = 0; run < 4; run++) begin
      for (int l = 0; l < C; l++) begin
        a[l] = 4'($urandom); b[l] = 4'($urandom); lf[l] = 9'($urandom);
      end
      if (run == 0) begin a[0] = 4'hf; b[0] = 4'hf; end
      for (int i = 0; i < 4; i++) begin
        for (int l = 0; l < C; l++) row[l] = a[l][i];
        host_write(mp.ta + i, row);
        for (int l = 0; l < C; l++) row[l] = b[l][i];
        host_write(mp.tb + i, row);
      end
      for (int i = 0; i < 9; i++) begin
        for (int l = 0; l < C; l++) row[l] = lf[l][i];
        host_write(mp.lfsr + i, row);
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 0;
      while (!done) begin
        if (instr_valid) cycles++;
        @(negedge clk);
      end
      check(cycles == q.size(), $sformatf("program took %0d cycles, %0d words", cycles, q.size()));
      for (int l = 0; l < C; l++) begin
        logic [4:0] s;
        logic [7:0] p;
        logic [8:0] nl;
        logic       x;
        s = 5'(a[l]) + 5'(b[l]);
        p = 8'(a[l]) * 8'(b[l]);
        x = a[l][0] ^ b[l][0];
        nl = {lf[l][7:0], lf[l][4] ^ lf[l][8]};
        for (int i = 0; i < 5; i++) begin
          read_row(mp.tsum + i, row);
          check(row[l] == s[i], $sformatf("sum lane %0d bit %0d (%0d+%0d)", l, i, a[l], b[l]));
        end
        for (int i = 0; i < 8; i++) begin
          read_row(mp.tprod + i, row);
          check(row[l] == p[i], $sformatf("prod lane %0d bit %0d (%0d*%0d)", l, i, a[l], b[l]));
        end
        read_row(mp.txor, row);
        check(row[l] == x, $sformatf("xor lane %0d", l));
        for (int i = 0; i < 9; i++) begin
          read_row(mp.lfsr + i, row);
          check(row[l] == nl[i], $sformatf("lfsr lane %0d bit %0d", l, i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
