// Execution unit of one processor: runs the per-sample program chosen by the
// unit's role, one instruction per clock, with a multiply-accumulate
// datapath, a coefficient memory (SMem) and a working memory (WMem).
//
// The document characterises each mapping by short loops of single-cycle
// instructions (MOVE, MULT, ADD, MAC, CLACC) whose closing branch costs no
// cycle (zero-overhead looping). Instead of fetching and decoding such code,
// this unit hard-wires each loop as a small step sequence, so that every role
// spends exactly as many cycles per sample as its loop has instructions:
//
//   ROLE_DIST       1 step : OBuf <- IBuf0  (or the previous IBuf0 word when
//                            cfg.delay is set, which is the z^-1 of the
//                            direct-form delay line)
//   ROLE_MULT       1 step : OBuf <- IBuf0 * h0
//   ROLE_ADD        1 step : OBuf <- IBuf0 + IBuf1
//   ROLE_MULT_ADD   2 steps: W <- IBuf0 * h0 ; OBuf <- W + IBuf1
//   ROLE_DIST_MULT  3 steps: W <- IBuf0 ; OBuf <- W (forward) ; OBuf <- W * h0
//   ROLE_MAC        1 + fwd + (K>1) + K + psum steps:
//                   load x into the K-word circular delay line in WMem,
//                   forward the word that leaves it, clear ACC, K MACs
//                   walking WMem backwards against SMem, add the partial
//                   sum from IBuf1 and send the result.
//   ROLE_DIST_WIN   1 + K steps: load x (or the previous x when cfg.delay)
//                   into the K-word window in WMem, then send the window
//                   newest first; the oldest word goes out under fwd_tag,
//                   the others under out_tag, so the next distribute unit
//                   can pick out just that word while the multiplier takes
//                   all K through a tag mask.
//   ROLE_MACS       1 + K + psum steps: clear ACC, K MACs of words streamed
//                   in on IBuf0 against SMem, add the partial sum from IBuf1.
//   ROLE_ADD3       3 steps: clear ACC ; ACC <- IBuf0 + IBuf1 ;
//                   OBuf <- IBuf0 + ACC. Sums three partial results, two of
//                   which arrive in turn on IBuf0 (an output unit where
//                   three multiplier groups meet).
//
// A step that needs an empty input or a full output waits (stall is high);
// nothing else in the unit advances meanwhile. A ROLE_MAC unit without psum
// sends its result in the cycle of its last MAC, as the single-processor
// program does. The WMem address generator is a wrap-around pointer modulo K.
//
// Interface: IBuf heads arrive as valid/data pairs and are consumed with the
// pop strobes; results leave as flits through ob_push while !ob_full. The
// coefficient memory is written in cfg_clk through coef_we/coef_addr/
// coef_wdata, which should be used only while en is low. sample_done pulses once per completed
// program pass. All arithmetic wraps at DATA_W bits.
module pu_exec
  import fir_mesh_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  pu_cfg_t cfg,

  input  logic    cfg_clk,
  input  logic    coef_we,
  input  taddr_t  coef_addr,
  input  word_t   coef_wdata,

  input  logic    ib0_valid,
  input  word_t   ib0_data,
  output logic    ib0_pop,
  input  logic    ib1_valid,
  input  word_t   ib1_data,
  output logic    ib1_pop,

  input  logic    ob_full,
  output logic    ob_push,
  output flit_t   ob_flit,

  output logic    stall,
  output logic    sample_done
);

  typedef enum logic [2:0] {S_IN, S_FWD, S_CLR, S_MAC, S_ADD, S_OUT} step_e;

  step_e  step, step_nxt;
  word_t  smem [NTAPS_MAX];   // coefficients h
  word_t  wmem [NTAPS_MAX];   // local delay line (ROLE_MAC)
  taddr_t ptr;                // newest word in wmem
  taddr_t rd;                 // address generator for the MAC walk
  taddr_t tapi;               // tap counter (loop counter)
  word_t  acc;                // accumulator
  word_t  w;                  // working register (WMem(0) of the programs)
  word_t  prev;               // previous sample, for the z^-1 forward

  // ntaps is 1..16; keep the last index in range
  taddr_t last;
  assign last = (cfg.ntaps == 5'd0) ? taddr_t'(0) : taddr_t'(cfg.ntaps - 5'd1);

  taddr_t ptr_inc, rd_dec;
  assign ptr_inc = (ptr >= last) ? taddr_t'(0) : ptr + 1'b1;
  assign rd_dec  = (rd == 0) ? last : rd - 1'b1;

  word_t prod_mac, prod_h0, acc_mac, x_in;
  assign prod_mac = ((cfg.role == ROLE_MACS) ? ib0_data : wmem[rd]) * smem[tapi];
  assign x_in     = (cfg.role == ROLE_DIST_WIN && cfg.delay) ? prev : ib0_data;
  assign acc_mac  = ((tapi == 0) ? word_t'(0) : acc) + prod_mac;
  assign prod_h0  = ib0_data * smem[0];

  // Control: what the current step does this cycle.
  logic do_step;     // the current step completes this cycle
  logic ld_w, ld_prev, mac_adv, ld_x, win_adv, clr_tap, clr_acc, ld_acc;

  always_comb begin
    step_nxt    = step;
    do_step     = 1'b0;
    ib0_pop     = 1'b0;
    ib1_pop     = 1'b0;
    ob_push     = 1'b0;
    ob_flit     = '{tag: cfg.out_tag, data: '0};
    sample_done = 1'b0;
    ld_w        = 1'b0;
    ld_prev     = 1'b0;
    mac_adv     = 1'b0;
    ld_x        = 1'b0;
    win_adv     = 1'b0;
    clr_tap     = 1'b0;
    clr_acc     = 1'b0;
    ld_acc      = 1'b0;

    if (en) begin
      unique case (cfg.role)
        ROLE_DIST: if (ib0_valid && !ob_full) begin
          do_step      = 1'b1;
          ib0_pop      = 1'b1;
          ob_push      = 1'b1;
          ob_flit.data = cfg.delay ? prev : ib0_data;
          ld_prev      = 1'b1;
          sample_done  = 1'b1;
        end

        ROLE_MULT: if (ib0_valid && !ob_full) begin
          do_step      = 1'b1;
          ib0_pop      = 1'b1;
          ob_push      = 1'b1;
          ob_flit.data = prod_h0;
          sample_done  = 1'b1;
        end

        ROLE_ADD: if (ib0_valid && ib1_valid && !ob_full) begin
          do_step      = 1'b1;
          ib0_pop      = 1'b1;
          ib1_pop      = 1'b1;
          ob_push      = 1'b1;
          ob_flit.data = ib0_data + ib1_data;
          sample_done  = 1'b1;
        end

        ROLE_MULT_ADD: begin
          if (step == S_IN) begin
            if (ib0_valid) begin
              do_step  = 1'b1;
              ib0_pop  = 1'b1;
              ld_w     = 1'b1;          // W <- x * h0
              step_nxt = S_ADD;
            end
          end else if (ib1_valid && !ob_full) begin
            do_step      = 1'b1;
            ib1_pop      = 1'b1;
            ob_push      = 1'b1;
            ob_flit.data = w + ib1_data;
            step_nxt     = S_IN;
            sample_done  = 1'b1;
          end
        end

        ROLE_DIST_MULT: begin
          unique case (step)
            S_IN: if (ib0_valid) begin
              do_step  = 1'b1;
              ib0_pop  = 1'b1;
              ld_w     = 1'b1;          // W <- x
              step_nxt = S_FWD;
            end
            S_FWD: if (!ob_full) begin
              do_step      = 1'b1;
              ob_push      = 1'b1;
              ob_flit      = '{tag: cfg.fwd_tag, data: cfg.delay ? prev : w};
              ld_prev      = 1'b1;
              step_nxt     = S_OUT;
            end
            default: if (!ob_full) begin
              do_step      = 1'b1;
              ob_push      = 1'b1;
              ob_flit.data = w * smem[0];
              step_nxt     = S_IN;
              sample_done  = 1'b1;
            end
          endcase
        end

        ROLE_MAC: begin
          unique case (step)
            S_IN: if (ib0_valid) begin
              do_step  = 1'b1;
              ib0_pop  = 1'b1;
              ld_x     = 1'b1;          // wmem[ptr+1] <- x, W <- evicted word
              step_nxt = cfg.fwd ? S_FWD : ((last != 0) ? S_CLR : S_MAC);
            end
            S_FWD: if (!ob_full) begin
              do_step      = 1'b1;
              ob_push      = 1'b1;
              ob_flit      = '{tag: cfg.fwd_tag, data: w};
              step_nxt     = (last != 0) ? S_CLR : S_MAC;
            end
            S_CLR: begin
              do_step  = 1'b1;
              step_nxt = S_MAC;
            end
            S_MAC: begin
              if (tapi != last) begin
                do_step = 1'b1;
                mac_adv = 1'b1;
              end else if (cfg.psum) begin
                do_step  = 1'b1;
                mac_adv  = 1'b1;
                step_nxt = S_ADD;
              end else if (!ob_full) begin
                do_step      = 1'b1;
                mac_adv      = 1'b1;
                ob_push      = 1'b1;
                ob_flit.data = acc_mac;
                step_nxt     = S_IN;
                sample_done  = 1'b1;
              end
            end
            default: if (ib1_valid && !ob_full) begin   // S_ADD
              do_step      = 1'b1;
              ib1_pop      = 1'b1;
              ob_push      = 1'b1;
              ob_flit.data = acc + ib1_data;
              step_nxt     = S_IN;
              sample_done  = 1'b1;
            end
          endcase
        end

        ROLE_DIST_WIN: begin
          if (step == S_IN) begin
            if (ib0_valid) begin
              do_step  = 1'b1;
              ib0_pop  = 1'b1;
              ld_x     = 1'b1;          // window <- x (or previous x)
              ld_prev  = 1'b1;
              step_nxt = S_OUT;
            end
          end else if (!ob_full) begin  // send window, newest first
            do_step      = 1'b1;
            win_adv      = 1'b1;
            ob_push      = 1'b1;
            ob_flit      = '{tag: (tapi == last) ? cfg.fwd_tag : cfg.out_tag, data: wmem[rd]};
            if (tapi == last) begin
              step_nxt    = S_IN;
              sample_done = 1'b1;
            end
          end
        end

        ROLE_MACS: begin
          unique case (step)
            S_IN: begin                 // CLACC
              do_step  = 1'b1;
              clr_tap  = 1'b1;
              step_nxt = S_MAC;
            end
            S_MAC: if (ib0_valid) begin
              if (tapi != last) begin
                do_step = 1'b1;
                ib0_pop = 1'b1;
                mac_adv = 1'b1;
              end else if (cfg.psum) begin
                do_step  = 1'b1;
                ib0_pop  = 1'b1;
                mac_adv  = 1'b1;
                step_nxt = S_ADD;
              end else if (!ob_full) begin
                do_step      = 1'b1;
                ib0_pop      = 1'b1;
                mac_adv      = 1'b1;
                ob_push      = 1'b1;
                ob_flit.data = acc_mac;
                step_nxt     = S_IN;
                sample_done  = 1'b1;
              end
            end
            default: if (ib1_valid && !ob_full) begin   // S_ADD
              do_step      = 1'b1;
              ib1_pop      = 1'b1;
              ob_push      = 1'b1;
              ob_flit.data = acc + ib1_data;
              step_nxt     = S_IN;
              sample_done  = 1'b1;
            end
          endcase
        end

        ROLE_ADD3: begin
          unique case (step)
            S_IN: begin                 // CLACC
              do_step  = 1'b1;
              clr_acc  = 1'b1;
              step_nxt = S_ADD;
            end
            S_ADD: if (ib0_valid && ib1_valid) begin
              do_step  = 1'b1;
              ib0_pop  = 1'b1;
              ib1_pop  = 1'b1;
              ld_acc   = 1'b1;          // ACC <- IBuf0 + IBuf1
              step_nxt = S_OUT;
            end
            default: if (ib0_valid && !ob_full) begin
              do_step      = 1'b1;
              ib0_pop      = 1'b1;
              ob_push      = 1'b1;
              ob_flit.data = ib0_data + acc;
              step_nxt     = S_IN;
              sample_done  = 1'b1;
            end
          endcase
        end

        default: ;  // ROLE_IDLE
      endcase
    end
  end

  assign stall = en && (cfg.role != ROLE_IDLE) && !do_step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step <= S_IN;
      ptr  <= '0;
      rd   <= '0;
      tapi <= '0;
      acc  <= '0;
      w    <= '0;
      prev <= '0;
      for (int i = 0; i < NTAPS_MAX; i++) wmem[i] <= '0;
    end else begin
      step <= step_nxt;
      if (ld_prev) prev <= (cfg.role == ROLE_DIST_MULT) ? w : ib0_data;
      if (ld_w)    w    <= (cfg.role == ROLE_MULT_ADD) ? prod_h0 : ib0_data;
      if (ld_x) begin
        w             <= wmem[ptr_inc];
        wmem[ptr_inc] <= x_in;
        ptr           <= ptr_inc;
        rd            <= ptr_inc;
        tapi          <= '0;
      end
      if (mac_adv) begin
        acc  <= acc_mac;
        rd   <= rd_dec;
        tapi <= tapi + 1'b1;
      end
      if (win_adv) begin
        rd   <= rd_dec;
        tapi <= tapi + 1'b1;
      end
      if (clr_tap) tapi <= '0;
      if (clr_acc) acc  <= '0;
      if (ld_acc)  acc  <= ib0_data + ib1_data;
    end
  end

  // SMem is written from the configuration clock and read in clk; it must
  // not be written while the unit runs.
  always_ff @(posedge cfg_clk) begin
    if (coef_we) smem[coef_addr] <= coef_wdata;
  end

  a_coef_when_idle: assert property (@(posedge cfg_clk) disable iff (!rst_n) !(coef_we && en));

endmodule
