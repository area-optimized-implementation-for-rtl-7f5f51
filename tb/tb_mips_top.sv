// tb_mips_top: end-to-end test of the pipelined core at its default sizes.
//
// The testbench holds its own instruction-set model of the core: a register
// array, a data-memory array and a program counter, stepped one instruction
// at a time by the meaning of each instruction. The model also predicts the
// cycle in which every instruction retires, from the pipeline's timing
// rules: one instruction per cycle; a consumer enters EX no earlier than three
// cycles after the producer of one of its source registers did (two if that
// producer overflowed and so writes nothing); a taken branch in EX delays
// the next instruction by two cycles and a jump by one.
//
// Each program is loaded into the core through the run-time load port, the
// model is run to the program's final self-jump, and then the core is run
// and every retiring instruction (its cycle and any register write), every
// store and every overflow is compared in order with the model's lists. At
// the end the data memory is compared word by word. The first program is a
// hand-written one (array store and sum loops, every instruction type,
// overflow cases, a write to r0), with a few results also checked against
// hand-worked constants; a straight-line program checks the
// one-instruction-per-cycle rate; the rest are random programs over
// registers r0..r7, which make hazards frequent, with forward-only branches
// and jumps, and encodings outside the instruction set, which must act as
// no-operations. The mechanisms of the pipeline (hazard stall, stall behind a
// load, write-through from WB to ID, taken branch flush, jump, overflow,
// program load, write to r0, dropped encoding) are counted; one that never happens is a
// failure.
module tb_mips_top;
  import mips_pkg::*;

  localparam int IMEM_DEPTH = 256;
  localparam int DMEM_DEPTH = 256;
  localparam int NUM_RANDOM = 200;

  logic clk = 0, rst_n = 0;
  logic load_en = 0;
  logic [7:0] load_addr = 0;
  word_t load_data = 0;
  word_t pc;
  logic retire, wb_we, store, overflow;
  regaddr_t wb_addr;
  word_t wb_data, store_addr, store_data;

  mips_top dut (
    .clk(clk), .rst_n(rst_n), .load_en(load_en), .load_addr(load_addr), .load_data(load_data),
    .pc_o(pc), .retire_o(retire), .wb_we_o(wb_we), .wb_addr_o(wb_addr), .wb_data_o(wb_data),
    .store_o(store), .store_addr_o(store_addr), .store_data_o(store_data), .overflow_o(overflow));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- encoders
  function automatic word_t R(logic [5:0] fn, int rd, int rs, int rt, int sa = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sa), fn};
  endfunction
  function automatic word_t I(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic word_t J(int target_word);
    return {6'h02, 26'(target_word)};
  endfunction

  // ---------------------------------------------------------------- model
  word_t prog [IMEM_DEPTH];
  int    prog_len;
  word_t m_rf [32];
  word_t m_dm [DMEM_DEPTH];

  typedef struct { longint cyc; logic we; int rd; word_t val; } ret_t;
  typedef struct { word_t addr; word_t val; } st_t;
  ret_t exp_ret[$];
  st_t  exp_st[$];
  int   exp_ovf;

  // runs the model from PC 0 until it executes a jump to itself
  task automatic run_model();
    word_t  pcm = 0, ins, a, b, res, nxt;
    longint ready [32];
    longint t_ex = 2;      // EX cycle of the first instruction, counted from reset release
    longint wait_until = 0;
    int     steps = 0;
    logic   halt = 0;
    exp_ret.delete(); exp_st.delete(); exp_ovf = 0;
    foreach (m_rf[i]) m_rf[i] = '0;
    foreach (ready[i]) ready[i] = 0;
    while (!halt && steps < 5000) begin
      logic [5:0] op, fn;
      logic [4:0] rs, rt, rd, sa;
      logic we, ovf, use_rs, use_rt, taken, illegal;
      int dst;
      longint t;
      ins = prog[pcm[9:2]];
      op = ins[31:26]; fn = ins[5:0];
      rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11]; sa = ins[10:6];
      a = m_rf[rs]; b = m_rf[rt];
      we = 0; ovf = 0; dst = 0; res = 0;
      nxt = pcm + 4;
      use_rs = 0; use_rt = 0; illegal = 0;
      case (op)
        6'h00: begin
          use_rs = !(fn == 6'h00 || fn == 6'h02); use_rt = 1; we = 1; dst = rd;
          case (fn)
            6'h20: begin res = a + b; ovf = (a[31] == b[31]) && (res[31] != a[31]); end
            6'h21: res = a + b;
            6'h22: begin res = a - b; ovf = (a[31] != b[31]) && (res[31] != a[31]); end
            6'h23: res = a - b;
            6'h24: res = a & b;
            6'h25: res = a | b;
            6'h2A: res = ($signed(a) < $signed(b)) ? 1 : 0;
            6'h00: res = b << sa;
            6'h02: res = b >> sa;
            default: begin illegal = 1; we = 0; use_rs = 0; use_rt = 0; end
          endcase
        end
        6'h08: begin
          word_t imm = {{16{ins[15]}}, ins[15:0]};
          use_rs = 1; we = 1; dst = rt;
          res = a + imm; ovf = (a[31] == imm[31]) && (res[31] != a[31]);
        end
        6'h23: begin use_rs = 1; we = 1; dst = rt; res = m_dm[(a + {{16{ins[15]}}, ins[15:0]}) >> 2 & (DMEM_DEPTH - 1)]; end
        6'h2B: begin use_rs = 1; use_rt = 1; end
        6'h04, 6'h05: begin use_rs = 1; use_rt = 1; end
        6'h02: begin nxt = {pcm[31:28], ins[25:0], 2'b00}; halt = (nxt == pcm); end
        default: illegal = 1;
      endcase
      // timing: when does this instruction enter EX
      t = t_ex;
      if (wait_until > t) t = wait_until;
      if (use_rs && rs != 0 && ready[rs] > t) t = ready[rs];
      if (use_rt && rt != 0 && ready[rt] > t) t = ready[rt];
      // effects
      if (op == 6'h2B) begin
        word_t ad = a + {{16{ins[15]}}, ins[15:0]};
        m_dm[ad >> 2 & (DMEM_DEPTH - 1)] = b;
        exp_st.push_back('{ad, b});
      end
      taken = (op == 6'h04 && a == b) || (op == 6'h05 && a != b);
      if (op == 6'h04 && a == b) nxt = pcm + 4 + {{14{ins[15]}}, ins[15:0], 2'b00};
      if (op == 6'h05 && a != b) nxt = pcm + 4 + {{14{ins[15]}}, ins[15:0], 2'b00};
      if (ovf) begin exp_ovf++; we = 0; end
      if (we && dst != 0) m_rf[dst] = res;
      // an encoding outside the set is dropped in ID: it takes its fetch
      // slot but never retires
      if (!illegal) exp_ret.push_back('{t + 2, we && dst != 0, dst, res});
      else n_illegal_model++;
      if (we && dst != 0) ready[dst] = t + 3;
      else if (ovf && dst != 0) ready[dst] = (ready[dst] > t + 2) ? ready[dst] : t + 2;
      // next instruction's earliest EX cycle
      t_ex = t + 1;
      if (taken) t_ex = t + 3;
      if (op == 6'h02) t_ex = t + 2;
      wait_until = 0;
      pcm = nxt;
      steps++;
    end
    if (!halt) $fatal(1, "model: program did not reach its halt");
  endtask

  // ---------------------------------------------------------------- counters
  int n_illegal_model;
  int n_stall, n_load_stall, n_wthru, n_branch, n_jump, n_ovf, n_load, n_r0;

  always @(posedge clk) if (rst_n && dut.core_rst_n) begin
    if (dut.stall) n_stall++;
    if (dut.stall && dut.idex_q.valid && dut.idex_q.ctrl.mem_read) n_load_stall++;
    if (dut.branch_taken) n_branch++;
    if (dut.jump_id) n_jump++;
    if (dut.memwb_q.valid && dut.memwb_q.reg_write && dut.memwb_q.dst != 0 && dut.ifid_q.valid &&
        ((dut.ctrl_id.uses_rs && dut.rs_id == dut.memwb_q.dst) ||
         (dut.ctrl_id.uses_rt && dut.rt_id == dut.memwb_q.dst))) n_wthru++;
    if (dut.memwb_q.valid && dut.memwb_q.reg_write && dut.memwb_q.dst == 0) n_r0++;
  end

  // ---------------------------------------------------------------- run one program
  task automatic run_program(string name);
    longint t0;
    int nret = 0, nst = 0, novf = 0, guard = 0;
    // the model starts from the memory contents the core has now
    for (int i = 0; i < DMEM_DEPTH; i++) m_dm[i] = dut.u_dmem.mem[i];
    for (int i = prog_len; i < IMEM_DEPTH; i++) prog[i] = J(i);
    run_model();
    // load through the run-time port; the core is held in reset meanwhile
    @(negedge clk);
    load_en = 1;
    for (int i = 0; i < IMEM_DEPTH; i++) begin
      load_addr = 8'(i);
      load_data = prog[i];
      @(negedge clk);
    end
    load_en = 0;
    n_load++;
    // wait for the core to leave reset; t0 is its first running cycle
    do begin
      @(posedge clk);
      #1;
    end while (!dut.core_rst_n);
    t0 = cycle - 1;
    while ((nret < exp_ret.size() || nst < exp_st.size()) && guard < 20000) begin
      @(posedge clk);
      #1;
      guard++;
      if (retire) begin
        if (nret < exp_ret.size()) begin
          ret_t e = exp_ret[nret];
          chk({name, " retire cycle"}, cycle - 1 - t0, e.cyc);
          chk({name, " write enable"}, wb_we, e.we);
          if (e.we) begin
            chk({name, " write reg"}, wb_addr, e.rd);
            chk({name, " write data"}, wb_data, e.val);
          end
        end
        nret++;
      end
      if (store) begin
        if (nst < exp_st.size()) begin
          chk({name, " store addr"}, store_addr, exp_st[nst].addr);
          chk({name, " store data"}, store_data, exp_st[nst].val);
        end else begin
          failures++; $display("FAIL %s unexpected store", name);
        end
        nst++;
      end
      if (overflow) novf++;
    end
    chk({name, " retired"}, nret, exp_ret.size());
    chk({name, " stores"}, nst, exp_st.size());
    chk({name, " overflows"}, novf, exp_ovf);
    repeat (6) @(posedge clk);
    #1;
    for (int i = 0; i < DMEM_DEPTH; i++) chk({name, " dmem"}, dut.u_dmem.mem[i], m_dm[i]);
    for (int i = 1; i < 32; i++) chk({name, " reg"}, dut.u_rf.regs[i], m_rf[i]);
  endtask

  // ---------------------------------------------------------------- programs
  task automatic directed_program();
    int k = 0;
    prog[k++] = I(6'h08, 1, 0, 10);          // 0  addi r1, r0, 10
    prog[k++] = I(6'h08, 2, 0, 0);           // 1  addi r2, r0, 0
    prog[k++] = I(6'h08, 3, 0, 1);           // 2  addi r3, r0, 1
    prog[k++] = I(6'h2B, 3, 2, 0);           // 3  sw   r3, 0(r2)
    prog[k++] = I(6'h08, 3, 3, 1);           // 4  addi r3, r3, 1
    prog[k++] = I(6'h08, 2, 2, 4);           // 5  addi r2, r2, 4
    prog[k++] = I(6'h08, 1, 1, -1);          // 6  addi r1, r1, -1
    prog[k++] = I(6'h05, 0, 1, -5);          // 7  bne  r1, r0, 3
    prog[k++] = I(6'h08, 1, 0, 10);          // 8
    prog[k++] = I(6'h08, 2, 0, 0);           // 9
    prog[k++] = I(6'h08, 4, 0, 0);           // 10 sum = 0
    prog[k++] = I(6'h23, 5, 2, 0);           // 11 lw   r5, 0(r2)
    prog[k++] = R(6'h20, 4, 4, 5);           // 12 add  r4, r4, r5 (uses the load at once)
    prog[k++] = I(6'h08, 2, 2, 4);           // 13
    prog[k++] = I(6'h08, 1, 1, -1);          // 14
    prog[k++] = I(6'h05, 0, 1, -5);          // 15 bne  r1, r0, 11
    prog[k++] = I(6'h2B, 4, 0, 64);          // 16 sw   r4, 64(r0)
    prog[k++] = R(6'h00, 6, 0, 4, 4);        // 17 sll  r6, r4, 4
    prog[k++] = R(6'h02, 7, 0, 6, 2);        // 18 srl  r7, r6, 2
    prog[k++] = R(6'h2A, 8, 7, 4);           // 19 slt  r8, r7, r4
    prog[k++] = R(6'h2A, 9, 4, 7);           // 20 slt  r9, r4, r7
    prog[k++] = R(6'h22, 10, 4, 7);          // 21 sub  r10, r4, r7
    prog[k++] = R(6'h24, 11, 6, 7);          // 22 and
    prog[k++] = R(6'h25, 12, 6, 7);          // 23 or
    prog[k++] = I(6'h08, 13, 0, -1);         // 24 r13 = -1
    prog[k++] = R(6'h02, 13, 0, 13, 1);      // 25 r13 = 0x7fffffff
    prog[k++] = I(6'h08, 14, 0, 1);          // 26
    prog[k++] = R(6'h20, 15, 13, 14);        // 27 add overflows: r15 stays 0
    prog[k++] = R(6'h21, 16, 13, 14);        // 28 addu wraps: 0x80000000
    prog[k++] = R(6'h22, 17, 16, 14);        // 29 sub overflows
    prog[k++] = R(6'h23, 18, 16, 14);        // 30 subu: 0x7fffffff
    prog[k++] = I(6'h08, 19, 13, 1);         // 31 addi overflows
    prog[k++] = I(6'h04, 0, 8, 1);           // 32 beq r8, r0 taken
    prog[k++] = I(6'h08, 20, 0, 99);         // 33 skipped
    prog[k++] = I(6'h04, 0, 9, 1);           // 34 beq r9, r0 not taken
    prog[k++] = I(6'h08, 21, 0, 77);         // 35
    prog[k++] = J(38);                       // 36
    prog[k++] = I(6'h08, 22, 0, 55);         // 37 skipped
    prog[k++] = I(6'h08, 0, 0, 5);           // 38 write to r0 is dropped
    prog[k++] = R(6'h20, 23, 0, 0);          // 39 r23 = r0 + r0
    prog[k++] = I(6'h2B, 10, 0, 68);         // 40 sw r10, 68(r0)
    prog[k++] = R(6'h00, 0, 0, 0, 0);        // 41 nop (sll r0, r0, 0)
    prog[k++] = J(42);                       // 42 halt
    prog_len = k;
  endtask

  task automatic straight_program();
    int k = 0;
    for (int i = 1; i < 32; i++) prog[k++] = I(6'h08, i, 0, i * 3);
    prog[k] = J(k);
    k++;
    prog_len = k;
  endtask

  task automatic random_program(int len);
    int k = 0;
    while (k < len) begin
      int kind = $urandom_range(0, 20);
      int rd = $urandom_range(0, 7), rs = $urandom_range(0, 7), rt = $urandom_range(0, 7);
      case (kind)
        0, 1, 2: prog[k++] = I(6'h08, rd, rs, $urandom_range(0, 65535));
        3:  prog[k++] = R(6'h20, rd, rs, rt);
        4:  prog[k++] = R(6'h21, rd, rs, rt);
        5:  prog[k++] = R(6'h22, rd, rs, rt);
        6:  prog[k++] = R(6'h23, rd, rs, rt);
        7:  prog[k++] = R(6'h24, rd, rs, rt);
        8:  prog[k++] = R(6'h25, rd, rs, rt);
        9:  prog[k++] = R(6'h2A, rd, rs, rt);
        10: prog[k++] = R(6'h00, rd, 0, rt, $urandom_range(0, 31));
        11: prog[k++] = R(6'h02, rd, 0, rt, $urandom_range(0, 31));
        12, 13: prog[k++] = I(6'h23, rd, rs, $urandom_range(0, 65535));
        14, 15: prog[k++] = I(6'h2B, rt, rs, $urandom_range(0, 65535));
        16: prog[k++] = I(6'h04, rt, rs, $urandom_range(0, 3));
        17: prog[k++] = I(6'h05, rt, rs, $urandom_range(0, 3));
        18: begin prog[k] = J(k + 1 + $urandom_range(0, 3)); k++; end
        19: prog[k++] = (k % 2) ? {6'h3F, 26'($urandom)} : {6'h00, 20'($urandom), 6'h3F};
        default: prog[k++] = R(6'h00, 0, 0, 0, 0);
      endcase
    end
    // landing pad: forward branches and jumps may overshoot the end
    for (int i = 0; i < 6; i++) begin prog[k] = J(k); k++; end
    prog_len = k;
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    directed_program();
    run_program("directed");
    chk("directed sum r4", dut.u_rf.regs[4], 55);
    chk("directed stored sum", dut.u_dmem.mem[16], 55);
    chk("directed add overflow left r15", dut.u_rf.regs[15], 0);
    chk("directed addu wrap", dut.u_rf.regs[16], 32'h8000_0000);
    chk("directed subu", dut.u_rf.regs[18], 32'h7FFF_FFFF);
    chk("directed skipped r20", dut.u_rf.regs[20], 0);
    chk("directed r21", dut.u_rf.regs[21], 77);
    chk("directed skipped r22", dut.u_rf.regs[22], 0);
    chk("directed overflow count", exp_ovf, 3);

    // rate: 31 independent instructions and the halt jump retire on
    // consecutive cycles, the first in cycle 4 after reset release
    straight_program();
    run_program("straight");
    chk("straight first retire", exp_ret[0].cyc, 4);
    chk("straight last retire", exp_ret[31].cyc, 4 + 31);

    for (int p = 0; p < NUM_RANDOM; p++) begin
      random_program(150);
      run_program($sformatf("random%0d", p));
    end

    $display("mechanisms: stall=%0d load_stall=%0d write_through=%0d branch_taken=%0d jump=%0d overflow=%0d program_load=%0d r0_write=%0d illegal=%0d",
             n_stall, n_load_stall, n_wthru, n_branch, n_jump, n_ovf, n_load, n_r0, n_illegal_model);
    if (n_illegal_model == 0) begin failures++; $display("FAIL no illegal encoding"); end
    if (n_ovf == 0)        begin failures++; $display("FAIL no overflow"); end
    if (n_stall == 0)      begin failures++; $display("FAIL no hazard stall"); end
    if (n_load_stall == 0) begin failures++; $display("FAIL no stall behind a load"); end
    if (n_wthru == 0)      begin failures++; $display("FAIL no write-through"); end
    if (n_branch == 0)     begin failures++; $display("FAIL no taken branch"); end
    if (n_jump == 0)       begin failures++; $display("FAIL no jump"); end
    if (n_load == 0)       begin failures++; $display("FAIL no program load"); end
    if (n_r0 == 0)         begin failures++; $display("FAIL no write to r0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (overflow) n_ovf++;
endmodule
