// cdp1802_cpu: a CDP1802 (COSMAC) compatible processor core.
//
// Architecture (as on the original part): sixteen 16-bit registers R(0..F);
// the 4-bit pointers P (selects the program counter R(P)) and X (selects the
// data pointer R(X)); the opcode halves I and N; the 8-bit accumulator D with
// its carry/borrow flag DF; the 8-bit T register (saved X,P); the Q output
// flip-flop; and the interrupt enable IE. Every instruction takes a fetch
// machine cycle and an execute machine cycle, except the Cx group (long
// branches, long skips, NOP), which takes a second, forced execute cycle.
// Between instructions the core takes DMA cycles (DMA-IN before DMA-OUT, each
// moving one byte between the I/O bus and M(R(0)) and advancing R(0)) and
// interrupt cycles (T <- X,P; P <- 1; X <- 2; IE <- 0), with the priorities
// of the 1802 state diagram. IDL waits in the execute state until a DMA or
// interrupt request arrives.
//
// Timing. A machine cycle is four clocks, counted by cc = 0..3:
//   cc0  the memory address (and write data and write enable) is set up at
//        the end of this clock;
//   cc1  the memory reads, or writes when mem_we is high;
//   cc2  read data is valid; all register results are committed at the end
//        of this clock (ALU results included);
//   cc3  the next machine cycle is chosen at the end of this clock from the
//        DMA, interrupt and idle conditions. tpb is high in this clock.
// The memory port expects one clock of read latency (ram_dp port B).
// An instruction therefore takes 8 clocks, a Cx instruction 12, a DMA or
// interrupt cycle 4.
//
// Control modes come in as the active-low CLEAR and WAIT inputs:
// RUN (1,1) runs; RESET (0,1) resets and holds; PAUSE (1,0) and LOAD (0,0)
// freeze the core where it is. After reset the core runs one
// initialisation cycle that clears X, P and R(0) and sets IE, then fetches
// from R(0). rst is a synchronous system reset with the same effect as
// RESET mode.
//
// I/O: OUT (61..67) places M(R(X)) on bus_out with out_valid high during
// cc3 of the execute cycle and N on n_lines; INP (69..6F) takes bus_in,
// sampled at the end of cc0, into M(R(X)) and D. DMA-OUT uses the same
// bus_out/out_valid path with sc = DMA; DMA-IN samples bus_in like INP.
// EF1..EF4 (ef_n, active low as on the part) are tested by B1..B4/BN1..BN4.
//
// Follows the 1802 instruction set and state diagram. This design's own
// choices: four clocks per machine cycle with the cc0..cc3 schedule above; a
// flat 16-bit address (no multiplexed high/low address byte, no TPA); LOAD
// mode treated like PAUSE; all registers, D and DF cleared by reset; opcode
// 68 executed as a no-operation; IDL performs no memory read.
// Where the written description of an instruction and the COSMAC definition
// differ, the COSMAC behaviour is used: a short branch replaces only the low
// byte of R(P); ADC (74) adds M(R(X)) like the rest of row 7, and ADCI (7C)
// the immediate byte; SAV (78) stores T at M(R(X)). SHRC/SHLC rotate through
// DF (the old DF enters, the bit shifted out becomes DF).
module cdp1802_cpu
  import cdp1802_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clear_n,     // CLEAR, active low
  input  logic        wait_n,      // WAIT, active low
  // memory
  output logic [15:0] ma,          // memory address
  output logic [7:0]  mem_wdata,
  output logic        mem_we,      // MWR, active high here
  output logic        mem_rd,      // memory read cycle in progress
  input  logic [7:0]  mem_rdata,
  // flags and requests (active low, as on the part)
  input  logic [3:0]  ef_n,        // EF4..EF1
  input  logic        int_n,
  input  logic        dma_in_n,
  input  logic        dma_out_n,
  // I/O
  output logic [2:0]  n_lines,     // N0..N2 during an I/O instruction
  output logic [7:0]  bus_out,
  output logic        out_valid,   // bus_out holds OUT or DMA-OUT data
  input  logic [7:0]  bus_in,
  output logic        q,
  output sc_e         sc,          // state code SC1,SC0
  output logic        tpb,         // last clock of a machine cycle
  output cpu_debug_t  dbg
);

  // ---------------------------------------------------------------- state
  logic [15:0] r [16];
  logic [3:0]  p, x, i_reg, n_reg;
  logic [7:0]  d, t, b_hi;
  logic        df, ie, idle, dma_is_in;
  state_e      state;
  logic [1:0]  cc;
  logic [7:0]  in_latch;

  logic running, resetting;
  assign resetting = rst || (clear_n == 1'b0 && wait_n == 1'b1);
  assign running   = !resetting && clear_n && wait_n;

  // ---------------------------------------------------------------- decode
  logic [15:0] rn, rx, rp;
  assign rn = r[n_reg];
  assign rx = r[x];
  assign rp = r[p];

  logic flag_q, flag_z, flag_df;
  logic [3:0] ef;
  assign ef      = ~ef_n;
  assign flag_q  = q;
  assign flag_z  = (d == 8'h00);
  assign flag_df = df;

  // short branch condition (3N)
  logic sbr_cond;
  always_comb begin
    unique case (n_reg[2:0])
      3'd0: sbr_cond = 1'b1;
      3'd1: sbr_cond = flag_q;
      3'd2: sbr_cond = flag_z;
      3'd3: sbr_cond = flag_df;
      default: sbr_cond = ef[n_reg[1:0]];
    endcase
    if (n_reg[3]) sbr_cond = ~sbr_cond;   // 38 = SKP: never branch
  end

  // long branch / long skip (CN)
  logic lbr_op, lskp_op, l_cond;
  always_comb begin
    lbr_op  = 1'b0;
    lskp_op = 1'b0;
    l_cond  = 1'b0;
    unique case (n_reg)
      4'h0: begin lbr_op  = 1'b1; l_cond = 1'b1;     end // LBR
      4'h1: begin lbr_op  = 1'b1; l_cond = flag_q;   end // LBQ
      4'h2: begin lbr_op  = 1'b1; l_cond = flag_z;   end // LBZ
      4'h3: begin lbr_op  = 1'b1; l_cond = flag_df;  end // LBDF
      4'h4: ;                                            // NOP
      4'h5: begin lskp_op = 1'b1; l_cond = !flag_q;  end // LSNQ
      4'h6: begin lskp_op = 1'b1; l_cond = !flag_z;  end // LSNZ
      4'h7: begin lskp_op = 1'b1; l_cond = !flag_df; end // LSNF
      4'h8: begin lskp_op = 1'b1; l_cond = 1'b1;     end // LSKP
      4'h9: begin lbr_op  = 1'b1; l_cond = !flag_q;  end // LBNQ
      4'hA: begin lbr_op  = 1'b1; l_cond = !flag_z;  end // LBNZ
      4'hB: begin lbr_op  = 1'b1; l_cond = !flag_df; end // LBNF
      4'hC: begin lskp_op = 1'b1; l_cond = ie;       end // LSIE
      4'hD: begin lskp_op = 1'b1; l_cond = flag_q;   end // LSQ
      4'hE: begin lskp_op = 1'b1; l_cond = flag_z;   end // LSZ
      default: begin lskp_op = 1'b1; l_cond = flag_df; end // LSDF
    endcase
  end

  // memory access of the execute cycle
  typedef enum logic [2:0] {A_NONE, A_RN, A_RX, A_RP, A_R2} asrc_e;
  typedef enum logic [1:0] {W_D, W_T, W_XP, W_BUS} wsrc_e;
  asrc_e asrc;
  logic  ex_write;
  wsrc_e wsrc;

  always_comb begin
    asrc     = A_NONE;
    ex_write = 1'b0;
    wsrc     = W_D;
    unique case (i_reg)
      4'h0: if (n_reg != 4'h0) asrc = A_RN;                  // LDN
      4'h3: asrc = A_RP;                                     // short branch
      4'h4: asrc = A_RN;                                     // LDA
      4'h5: begin asrc = A_RN; ex_write = 1'b1; end          // STR
      4'h6: begin
        if (n_reg[3] && n_reg != 4'h8) begin                 // INP
          asrc = A_RX; ex_write = 1'b1; wsrc = W_BUS;
        end else if (!n_reg[3] && n_reg != 4'h0) begin       // OUT
          asrc = A_RX;
        end
      end
      4'h7: begin
        unique case (n_reg)
          4'h0, 4'h1, 4'h2, 4'h4, 4'h5, 4'h7: asrc = A_RX;    // RET DIS LDXA ADC SDB SMB
          4'h3: begin asrc = A_RX; ex_write = 1'b1; end      // STXD
          4'h8: begin asrc = A_RX; ex_write = 1'b1; wsrc = W_T;  end // SAV
          4'h9: begin asrc = A_R2; ex_write = 1'b1; wsrc = W_XP; end // MARK
          4'hC, 4'hD, 4'hF: asrc = A_RP;                     // ADCI SDBI SMBI
          default: ;
        endcase
      end
      4'hC: if (lbr_op) asrc = A_RP;                         // long branch
      4'hF: if (n_reg[2:0] != 3'd6) asrc = n_reg[3] ? A_RP : A_RX;
      default: ;
    endcase
  end

  logic [15:0] ex_addr;
  always_comb begin
    unique case (asrc)
      A_RN:    ex_addr = rn;
      A_RX:    ex_addr = rx;
      A_RP:    ex_addr = rp;
      A_R2:    ex_addr = r[2];
      default: ex_addr = rp;
    endcase
  end

  // ALU
  alu_op_e alu_op;
  logic    alu_use_carry;
  logic [7:0] alu_result;
  logic       alu_df;

  always_comb begin
    alu_use_carry = (i_reg == 4'h7);
    unique case (n_reg[2:0])
      3'd1:    alu_op = ALU_OR;
      3'd2:    alu_op = ALU_AND;
      3'd3:    alu_op = ALU_XOR;
      3'd4:    alu_op = ALU_ADD;
      3'd5:    alu_op = ALU_SD;
      default: alu_op = ALU_SM;
    endcase
  end

  alu1802 u_alu (
    .op        (alu_op),
    .use_carry (alu_use_carry),
    .d         (d),
    .m         (mem_rdata),
    .df_in     (df),
    .result    (alu_result),
    .df_out    (alu_df)
  );

  // request conditions for the next-cycle choice
  logic dma_req, int_req;
  assign dma_req = !dma_in_n || !dma_out_n;
  assign int_req = !int_n && ie;

  // ---------------------------------------------------------------- outputs
  always_comb begin
    unique case (state)
      ST_FETCH:           sc = SC_FETCH;
      ST_DMA:             sc = SC_DMA;
      ST_INT:             sc = SC_INT;
      default:            sc = SC_EXECUTE;
    endcase
  end

  assign tpb = running && (cc == 2'd3);
  assign n_lines = (state == ST_EXEC && i_reg == 4'h6) ? n_reg[2:0] : 3'd0;

  assign dbg.d    = d;
  assign dbg.df   = df;
  assign dbg.q    = q;
  assign dbg.ie   = ie;
  assign dbg.p    = p;
  assign dbg.x    = x;
  assign dbg.t    = t;
  assign dbg.pc   = rp;
  assign dbg.idle = idle;

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk) begin
    if (resetting) begin
      state     <= ST_INIT;
      cc        <= 2'd0;
      i_reg     <= 4'h0;
      n_reg     <= 4'h0;
      q         <= 1'b0;
      ie        <= 1'b1;
      d         <= 8'h00;
      df        <= 1'b0;
      t         <= 8'h00;
      b_hi      <= 8'h00;
      x         <= 4'h0;
      p         <= 4'h0;
      idle      <= 1'b0;
      dma_is_in <= 1'b0;
      mem_we    <= 1'b0;
      mem_rd    <= 1'b0;
      mem_wdata <= 8'h00;
      ma        <= 16'h0000;
      bus_out   <= 8'h00;
      out_valid <= 1'b0;
      in_latch  <= 8'h00;
      for (int k = 0; k < 16; k++) r[k] <= 16'h0000;
    end else if (running) begin
      cc <= cc + 2'd1;
      unique case (cc)
        // ---------------- cc0: address, write data, write enable
        2'd0: begin
          in_latch  <= bus_in;
          unique case (state)
            ST_FETCH: begin
              ma     <= rp;
              mem_rd <= 1'b1;
            end
            ST_EXEC: begin
              ma     <= ex_addr;
              mem_rd <= (asrc != A_NONE) && !ex_write;
              mem_we <= ex_write;
              unique case (wsrc)
                W_D:     mem_wdata <= d;
                W_T:     mem_wdata <= t;
                W_XP:    mem_wdata <= {x, p};
                default: mem_wdata <= bus_in;
              endcase
            end
            ST_EXEC2: begin
              ma     <= rp;
              mem_rd <= lbr_op;
            end
            ST_DMA: begin
              ma        <= r[0];
              mem_rd    <= !dma_is_in;
              mem_we    <= dma_is_in;
              mem_wdata <= bus_in;
            end
            default: ;
          endcase
        end
        // ---------------- cc1: memory access
        2'd1: begin
          mem_we <= 1'b0;
        end
        // ---------------- cc2: commit
        2'd2: begin
          mem_rd <= 1'b0;
          unique case (state)
            ST_INIT: begin
              x    <= 4'h0;
              p    <= 4'h0;
              r[0] <= 16'h0000;
              ie   <= 1'b1;
            end
            ST_FETCH: begin
              i_reg <= mem_rdata[7:4];
              n_reg <= mem_rdata[3:0];
              r[p]  <= rp + 16'd1;
            end
            ST_DMA: begin
              r[0] <= r[0] + 16'd1;
              if (!dma_is_in) begin
                bus_out   <= mem_rdata;
                out_valid <= 1'b1;
              end
            end
            ST_INT: begin
              t  <= {x, p};
              p  <= 4'h1;
              x  <= 4'h2;
              ie <= 1'b0;
            end
            ST_EXEC2: begin
              if (lbr_op) begin
                if (l_cond) r[p] <= {b_hi, mem_rdata};
                else        r[p] <= rp + 16'd1;
              end else if (lskp_op && l_cond) begin
                r[p] <= rp + 16'd1;
              end
            end
            ST_EXEC: begin
              unique case (i_reg)
                4'h0: if (n_reg != 4'h0) d <= mem_rdata;          // LDN
                      else idle <= 1'b1;                          // IDL
                4'h1: r[n_reg] <= rn + 16'd1;                     // INC
                4'h2: r[n_reg] <= rn - 16'd1;                     // DEC
                4'h3: begin                                       // short branch
                  if (sbr_cond) r[p] <= {rp[15:8], mem_rdata};
                  else          r[p] <= rp + 16'd1;
                end
                4'h4: begin d <= mem_rdata; r[n_reg] <= rn + 16'd1; end // LDA
                4'h5: ;                                           // STR
                4'h6: begin
                  if (n_reg == 4'h0) r[x] <= rx + 16'd1;          // IRX
                  else if (!n_reg[3]) begin                       // OUT
                    r[x]      <= rx + 16'd1;
                    bus_out   <= mem_rdata;
                    out_valid <= 1'b1;
                  end else if (n_reg != 4'h8) begin               // INP
                    d <= in_latch;
                  end
                end
                4'h7: begin
                  unique case (n_reg)
                    4'h0, 4'h1: begin                             // RET, DIS
                      {x, p} <= mem_rdata;
                      r[x]   <= rx + 16'd1;
                      ie     <= ~n_reg[0];
                    end
                    4'h2: begin d <= mem_rdata; r[x] <= rx + 16'd1; end // LDXA
                    4'h3: r[x] <= rx - 16'd1;                     // STXD
                    4'h6: begin d <= {df, d[7:1]}; df <= d[0]; end // SHRC
                    4'h8: ;                                       // SAV
                    4'h9: begin                                   // MARK
                      t    <= {x, p};
                      x    <= p;
                      r[2] <= r[2] - 16'd1;
                    end
                    4'hA: q <= 1'b0;                              // REQ
                    4'hB: q <= 1'b1;                              // SEQ
                    4'hE: begin d <= {d[6:0], df}; df <= d[7]; end // SHLC
                    4'h4, 4'h5, 4'h7: begin d <= alu_result; df <= alu_df; end
                    4'hC, 4'hD, 4'hF: begin
                      d <= alu_result; df <= alu_df; r[p] <= rp + 16'd1;
                    end
                    default: ;
                  endcase
                end
                4'h8: d <= rn[7:0];                               // GLO
                4'h9: d <= rn[15:8];                              // GHI
                4'hA: r[n_reg][7:0]  <= d;                        // PLO
                4'hB: r[n_reg][15:8] <= d;                        // PHI
                4'hC: begin
                  if (lbr_op) begin
                    b_hi <= mem_rdata;
                    r[p] <= rp + 16'd1;
                  end else if (lskp_op && l_cond) begin
                    r[p] <= rp + 16'd1;
                  end
                end
                4'hD: p <= n_reg;                                 // SEP
                4'hE: x <= n_reg;                                 // SEX
                default: begin                                    // Fx
                  if (n_reg == 4'h0) d <= mem_rdata;              // LDX
                  else if (n_reg == 4'h8) begin                   // LDI
                    d <= mem_rdata; r[p] <= rp + 16'd1;
                  end else if (n_reg == 4'h6) begin               // SHR
                    d <= {1'b0, d[7:1]}; df <= d[0];
                  end else if (n_reg == 4'hE) begin               // SHL
                    d <= {d[6:0], 1'b0}; df <= d[7];
                  end else begin
                    d <= alu_result; df <= alu_df;
                    if (n_reg[3]) r[p] <= rp + 16'd1;
                  end
                end
              endcase
            end
            default: ;
          endcase
        end
        // ---------------- cc3: choose the next machine cycle
        default: begin
          out_valid <= 1'b0;
          unique case (state)
            ST_INIT: begin
              if (dma_req) begin state <= ST_DMA; dma_is_in <= !dma_in_n; end
              else state <= ST_FETCH;
            end
            ST_FETCH: state <= ST_EXEC;
            ST_EXEC, ST_EXEC2: begin
              if (state == ST_EXEC && i_reg == 4'hC) state <= ST_EXEC2;   // forced S1
              else if (dma_req) begin
                state <= ST_DMA; dma_is_in <= !dma_in_n; idle <= 1'b0;
              end else if (int_req) begin
                state <= ST_INT; idle <= 1'b0;
              end else if (idle) state <= ST_EXEC;                        // IDL loop
              else state <= ST_FETCH;
            end
            ST_DMA: begin
              if (dma_req) begin state <= ST_DMA; dma_is_in <= !dma_in_n; end
              else if (int_req) state <= ST_INT;
              else state <= ST_FETCH;
            end
            ST_INT: begin
              if (dma_req) begin state <= ST_DMA; dma_is_in <= !dma_in_n; end
              else state <= ST_FETCH;
            end
            default: state <= ST_FETCH;
          endcase
        end
      endcase
    end
  end

  // Bus rules: output data is only announced in the last clock of a
  // machine cycle, and a fetch never writes memory.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!out_valid || tpb)
        else $error("cdp1802_cpu: out_valid outside tpb");
      assert (!(mem_we && sc == SC_FETCH))
        else $error("cdp1802_cpu: memory write in a fetch cycle");
    end
  end

endmodule
