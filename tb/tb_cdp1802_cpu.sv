// tb_cdp1802_cpu: self-checking test of the 1802 core.
//
// The core runs from a 4 KB memory model with one clock of read latency.
// An instruction-level model of the 1802, written here from the instruction
// set definition, runs in lockstep: at the start of every fetch cycle the
// whole architectural state (R(0..F), D, DF, X, P, T, Q, IE) is compared,
// then the model executes the instruction the core is about to fetch. DMA
// and interrupt cycles the core takes are applied to the model as they
// start, and the choice of each next machine cycle is checked against the
// priorities of the state diagram (forced execute for Cx, then DMA-IN,
// DMA-OUT, interrupt when IE is set, idle loop, fetch). The clocks between
// fetches are checked: 8 per instruction, 12 for the Cx group, plus 4 per
// DMA or interrupt cycle. Memory is compared at the end of each program.
//
// Phase 1 runs random programs with no requests; phase 2 random programs
// with random DMA-IN, DMA-OUT and interrupt requests and IDL included;
// phase 3 checks the PAUSE and RESET modes.
module tb_cdp1802_cpu;
  import cdp1802_pkg::*;

  localparam int MEMSZ = 4096;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, clear_n, wait_n;
  logic [15:0] ma;
  logic [7:0]  mem_wdata, mem_rdata;
  logic        mem_we, mem_rd;
  logic [3:0]  ef_n;
  logic        int_n, dma_in_n, dma_out_n;
  logic [2:0]  n_lines;
  logic [7:0]  bus_out, bus_in;
  logic        out_valid, q, tpb;
  sc_e         sc;
  cpu_debug_t  dbg;

  cdp1802_cpu dut (.*);

  // memory model
  logic [7:0] mem  [MEMSZ];
  always_ff @(posedge clk) begin
    if (mem_we) mem[ma[11:0]] <= mem_wdata;
    mem_rdata <= mem[ma[11:0]];
  end

  // ------------------------------------------------------------ reference model
  logic [7:0]  imem [MEMSZ];
  logic [15:0] mr [16];
  logic [7:0]  md, mt;
  logic [3:0]  mx, mp;
  logic        mdf, mq, mie;
  logic        exp_out_pending;
  logic [7:0]  exp_out;
  logic        last_was_c, last_was_idl;

  int checks = 0, failures = 0;
  int n_instr = 0, n_dma_in = 0, n_dma_out = 0, n_int = 0, n_idle_wake = 0, n_out = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [7:0] rd(input logic [15:0] a);
    return imem[a[11:0]];
  endfunction

  task automatic model_reset();
    for (int k = 0; k < 16; k++) mr[k] = 16'h0;
    md = 0; mt = 0; mx = 0; mp = 0; mdf = 0; mq = 0; mie = 1;
    exp_out_pending = 0;
  endtask

  // one instruction
  task automatic model_step();
    logic [7:0] op, m;
    logic [3:0] i, n;
    int s;
    bit c, brw;
    op = rd(mr[mp]);
    mr[mp] = mr[mp] + 1;
    i = op[7:4]; n = op[3:0];
    last_was_c = (i == 4'hC);
    last_was_idl = (op == 8'h00);
    case (i)
      4'h0: if (n != 0) md = rd(mr[n]);
      4'h1: mr[n] = mr[n] + 1;
      4'h2: mr[n] = mr[n] - 1;
      4'h3: begin
        case (n[2:0])
          0: c = 1; 1: c = mq; 2: c = (md == 0); 3: c = mdf;
          default: c = !ef_n[n[1:0]];
        endcase
        if (n[3]) c = !c;
        if (c) mr[mp][7:0] = rd(mr[mp]);
        else mr[mp] = mr[mp] + 1;
      end
      4'h4: begin md = rd(mr[n]); mr[n] = mr[n] + 1; end
      4'h5: imem[mr[n][11:0]] = md;
      4'h6: begin
        if (n == 0) mr[mx] = mr[mx] + 1;
        else if (n < 8) begin
          exp_out = rd(mr[mx]); exp_out_pending = 1; mr[mx] = mr[mx] + 1;
        end else if (n > 8) begin
          imem[mr[mx][11:0]] = bus_in; md = bus_in;
        end
      end
      4'h7, 4'hF: begin
        m = rd((n[3] && !(i == 4'h7 && n < 8)) ? mr[mp] : mr[mx]);
        brw = (i == 4'h7) ? !mdf : 1'b0;
        case ({i[3], n})
          5'h00, 5'h01: begin
            m = rd(mr[mx]); mr[mx] = mr[mx] + 1; mx = m[7:4]; mp = m[3:0]; mie = !n[0];
          end
          5'h02: begin md = rd(mr[mx]); mr[mx] = mr[mx] + 1; end
          5'h03: begin imem[mr[mx][11:0]] = md; mr[mx] = mr[mx] - 1; end
          5'h06: begin c = md[0]; md = {mdf, md[7:1]}; mdf = c; end
          5'h08: imem[mr[mx][11:0]] = mt;
          5'h09: begin
            mt = {mx, mp}; imem[mr[2][11:0]] = mt; mx = mp; mr[2] = mr[2] - 1;
          end
          5'h0A: mq = 0;
          5'h0B: mq = 1;
          5'h0E: begin c = md[7]; md = {md[6:0], mdf}; mdf = c; end
          5'h10: md = m;
          5'h18: begin md = m; mr[mp] = mr[mp] + 1; end
          5'h16: begin mdf = md[0]; md = md >> 1; end
          5'h1E: begin mdf = md[7]; md = md << 1; end
          default: begin
            // arithmetic and logic: 74 75 77 7C 7D 7F F1-F5 F7 F9-FD FF
            case (n[2:0])
              1: md = md | m;
              2: md = md & m;
              3: md = md ^ m;
              4: begin s = int'(md) + int'(m) + ((i == 4'h7) ? int'(mdf) : 0);
                       md = s[7:0]; mdf = (s > 255); end
              5: begin s = int'(m) - int'(md) - int'(brw);
                       md = s[7:0]; mdf = (s >= 0); end
              7: begin s = int'(md) - int'(m) - int'(brw);
                       md = s[7:0]; mdf = (s >= 0); end
              default: ;
            endcase
            if (n[3]) mr[mp] = mr[mp] + 1;
          end
        endcase
      end
      4'h8: md = mr[n][7:0];
      4'h9: md = mr[n][15:8];
      4'hA: mr[n][7:0] = md;
      4'hB: mr[n][15:8] = md;
      4'hC: begin
        bit lbr, cnd;
        lbr = 0; cnd = 0;
        case (n)
          0: begin lbr = 1; cnd = 1; end
          1: begin lbr = 1; cnd = mq; end
          2: begin lbr = 1; cnd = (md == 0); end
          3: begin lbr = 1; cnd = mdf; end
          4: ;
          5: cnd = !mq;
          6: cnd = (md != 0);
          7: cnd = !mdf;
          8: cnd = 1;
          9: begin lbr = 1; cnd = !mq; end
          10: begin lbr = 1; cnd = (md != 0); end
          11: begin lbr = 1; cnd = !mdf; end
          12: cnd = mie;
          13: cnd = mq;
          14: cnd = (md == 0);
          default: cnd = mdf;
        endcase
        if (lbr && cnd) mr[mp] = {rd(mr[mp]), rd(mr[mp] + 1)};
        else if (lbr || cnd) mr[mp] = mr[mp] + 2;
      end
      4'hD: mp = n;
      default: mx = n;   // E
    endcase
  endtask

  task automatic compare_state(input string tag);
    bit ok;
    ok = (dut.d == md) && (dut.df == mdf) && (dut.x == mx) && (dut.p == mp) &&
         (dut.t == mt) && (dut.q == mq) && (dut.ie == mie);
    for (int k = 0; k < 16; k++) ok &= (dut.r[k] == mr[k]);
    if (!ok && failures < 20)
      $display("  state: dut D=%h DF=%b X=%h P=%h T=%h Q=%b IE=%b R(P)=%h | model D=%h DF=%b X=%h P=%h T=%h Q=%b IE=%b R(P)=%h",
               dut.d, dut.df, dut.x, dut.p, dut.t, dut.q, dut.ie, dut.r[dut.p],
               md, mdf, mx, mp, mt, mq, mie, mr[mp]);
    check(ok, tag);
  endtask

  // ------------------------------------------------------------ lockstep monitor
  bit     monitor_on = 0;
  int     clk_since_fetch, exp_clks;
  state_e exp_next;
  bit     have_exp_next;
  bit     exp_dma_in;
  bit     pending_out_seen;
  logic [7:0] seen_out;

  always @(posedge clk) begin
    if (monitor_on && !rst && clear_n && wait_n) begin
      clk_since_fetch++;
      if (out_valid && sc == SC_EXECUTE) begin pending_out_seen = 1; seen_out = bus_out; end
      // check of the next-state choice made at the previous cc3
      if (dut.cc == 2'd0 && have_exp_next) begin
        check(dut.state == exp_next, "next machine cycle");
        have_exp_next = 0;
      end
      if (dut.cc == 2'd0) begin
        unique case (dut.state)
          ST_FETCH: begin
            if (n_instr > 0 && !last_was_idl)
              check(clk_since_fetch == exp_clks, "clocks per instruction");
            if (exp_out_pending) begin
              check(pending_out_seen && seen_out == exp_out, "OUT data");
              n_out++;
            end
            exp_out_pending = 0;
            pending_out_seen = 0;
            compare_state("architectural state at fetch");
            model_step();
            n_instr++;
            clk_since_fetch = 0;
            exp_clks = last_was_c ? 12 : 8;
          end
          ST_DMA: begin
            if (exp_dma_in) begin
              imem[mr[0][11:0]] = bus_in; n_dma_in++;
            end else begin
              n_dma_out++;
            end
            mr[0] = mr[0] + 1;
            exp_clks += 4;
          end
          ST_INT: begin
            mt = {mx, mp}; mp = 1; mx = 2; mie = 0; n_int++;
            exp_clks += 4;
          end
          default: ;
        endcase
      end
      // the next-cycle rule, applied to the requests the core sees now
      if (dut.cc == 2'd3) begin
        bit dreq, ireq;
        dreq = !dma_in_n || !dma_out_n;
        ireq = !int_n && dut.ie;
        have_exp_next = 1;
        if (dreq) exp_dma_in = !dma_in_n;
        unique case (dut.state)
          ST_INIT:  exp_next = dreq ? ST_DMA : ST_FETCH;
          ST_FETCH: exp_next = ST_EXEC;
          ST_EXEC, ST_EXEC2: begin
            if (dut.state == ST_EXEC && dut.i_reg == 4'hC) exp_next = ST_EXEC2;
            else if (dreq) exp_next = ST_DMA;
            else if (ireq) exp_next = ST_INT;
            else if (dut.i_reg == 4'h0 && dut.n_reg == 4'h0) exp_next = ST_EXEC;
            else exp_next = ST_FETCH;
            if (dut.i_reg == 4'h0 && dut.n_reg == 4'h0 && (dreq || ireq)) n_idle_wake++;
          end
          ST_DMA:   exp_next = dreq ? ST_DMA : (ireq ? ST_INT : ST_FETCH);
          default:  exp_next = dreq ? ST_DMA : ST_FETCH;
        endcase
      end
    end
  end

  // DMA-OUT data check
  always @(posedge clk) begin
    if (monitor_on && out_valid && sc == SC_DMA)
      check(bus_out == rd(mr[0] - 1), "DMA-OUT data");
  end

  // ------------------------------------------------------------ stimulus
  bit random_requests = 0;
  always @(negedge clk) begin
    if (random_requests) begin
      if ($urandom_range(0, 99) < 3) int_n     <= ~int_n;
      if ($urandom_range(0, 99) < 2) dma_in_n  <= ~dma_in_n;
      if ($urandom_range(0, 99) < 2) dma_out_n <= ~dma_out_n;
    end
  end

  task automatic load_random_program(input bit allow_idl);
    for (int a = 0; a < MEMSZ; a++) begin
      logic [7:0] b;
      b = 8'($urandom);
      if (!allow_idl && b == 8'h00) b = 8'hC4;
      mem[a] = b;
      imem[a] = b;
    end
  endtask

  task automatic run_program(input int clocks, input bit allow_idl, input bit reqs);
    load_random_program(allow_idl);
    bus_in = 8'($urandom);
    ef_n   = 4'($urandom);
    int_n = 1; dma_in_n = 1; dma_out_n = 1;
    rst = 1; clear_n = 1; wait_n = 1;
    monitor_on = 0;
    repeat (2) @(posedge clk);
    model_reset();
    n_instr = 0; have_exp_next = 0; pending_out_seen = 0;
    @(negedge clk);
    rst = 0;
    monitor_on = 1;
    random_requests = reqs;
    repeat (clocks) @(posedge clk);
    random_requests = 0;
    int_n = 1; dma_in_n = 1; dma_out_n = 1;
    // stop on an instruction boundary: the last clock before a fetch
    @(negedge clk);
    while (!(dut.state == ST_FETCH && dut.cc == 2'd0)) begin
      dma_out_n = !dut.idle;   // an idling core is woken by a DMA request
      @(negedge clk);
    end
    dma_out_n = 1;
    wait_n = 0;
    @(negedge clk);
    monitor_on = 0;
    compare_state("architectural state at end");
    wait_n = 1;
    begin
      int bad = 0;
      for (int a = 0; a < MEMSZ; a++) if (mem[a] !== imem[a]) bad++;
      check(bad == 0, "memory contents");
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int total_instr = 0;
  initial begin
    rst = 1; clear_n = 1; wait_n = 1;
    int_n = 1; dma_in_n = 1; dma_out_n = 1; ef_n = 4'hF; bus_in = 0;

    // phase 1: random programs, no requests
    for (int k = 0; k < 30; k++) begin
      run_program(3000, 1'b0, 1'b0);
      total_instr += n_instr;
    end
    // phase 2: random programs with DMA / interrupt requests and IDL
    for (int k = 0; k < 30; k++) begin
      run_program(4000, 1'b1, 1'b1);
      total_instr += n_instr;
    end
    check(n_dma_in > 0,    "DMA-IN cycles occurred");
    check(n_dma_out > 0,   "DMA-OUT cycles occurred");
    check(n_int > 0,       "interrupt cycles occurred");
    check(n_idle_wake > 0, "IDL woken by a request");
    check(n_out > 0,       "OUT instructions occurred");

    // phase 3: modes. A program of INC R3 (13) forever.
    for (int a = 0; a < MEMSZ; a++) mem[a] = 8'h13;
    rst = 1; @(negedge clk); rst = 0;
    repeat (40) @(negedge clk);
    begin
      logic [15:0] r3, pc;
      // PAUSE: CLEAR high, WAIT low: nothing moves
      wait_n = 0;
      @(negedge clk);
      r3 = dut.r[3]; pc = dut.r[0];
      repeat (50) @(negedge clk);
      check(dut.r[3] == r3 && dut.r[0] == pc, "PAUSE freezes the core");
      // RUN again: 10 more instructions in 80 clocks
      wait_n = 1;
      repeat (80) @(negedge clk);
      check(dut.r[3] == r3 + 10, "RUN resumes: one INC per 8 clocks");
      // RESET: CLEAR low, WAIT high
      clear_n = 0;
      repeat (3) @(negedge clk);
      check(dut.r[3] == 0 && dut.r[0] == 0 && dut.state == ST_INIT && dut.ie == 1 && q == 0,
            "RESET clears the core");
      clear_n = 1;
      // init cycle (4 clocks) + 5 instructions
      repeat (4 + 40) @(negedge clk);
      check(dut.r[3] == 5 && dut.r[0] == 5, "restart after RESET at R(0)=0");
    end

    $display("instructions=%0d dma_in=%0d dma_out=%0d int=%0d idle_wakes=%0d out=%0d",
             total_instr, n_dma_in, n_dma_out, n_int, n_idle_wake, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
