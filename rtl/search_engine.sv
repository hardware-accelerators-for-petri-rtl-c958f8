// Search/compare engine with the simulation control of the accelerator.
//
// This state machine drives the breadth-first generation of the
// reachability set. Starting from the marking the host has loaded into the
// simulator, it stores that initial state and then repeats:
//
//   FIRE     if the daisy chain output is low, strobe the simulator once:
//            the first fireable transition fires (1 cycle);
//   READ     read the new marking, one 32-bit word per cycle, into the new-
//            state buffer and fold it into a hash code (NW32 cycles);
//   HASH     look up the head of the list for that code (1 cycle);
//   SEARCH   walk the list: per record, its header word, then its state
//            words, compared 64 bits per cycle and left at the first
//            mismatch (at most REC_WORDS cycles per record);
//   STORE    if not found, append the state as a new record, with no C flag
//            and a pointer to its predecessor, at the head of its list
//            (REC_WORDS cycles);
//   RESTORE  write back only the simulator words that differ from the state
//            being expanded; firing flip-flops are left alone, so the next
//            FIRE takes the next transition of the chain (one cycle per
//            changed word, at least one);
//
// and when the chain output is high (no transition left to fire):
//
//   COMPLETE set the C flag of the expanded record (1 cycle);
//   CHOOSE   scan for the first record without C flag; records are appended
//            in the order found, so this is the breadth-first queue; if
//            there is none the run is DONE;
//   LOAD     copy that record into the simulator and into the saved-state
//            buffer and clear the firing flip-flops (NW32 cycles).
//
// The step sequence, the C flag, the restore of the previous state and the
// hashed linked lists follow the source design. Record layout (a header
// word ahead of the state words), the hash function (rotate-and-XOR of the
// 32-bit words, then multiplicative hashing), insertion at the list head, restoring only changed words and the
// error handling are this implementation's choices.
//
// A record is REC_WORDS = 1 + ceil(NW32/2) words at address
// record*REC_WORDS; the header is a pn_pkg::rec_hdr_t. The run stops in
// ERROR when a place counter would overflow (the net is not bounded by the
// counter width) or when the storage is full.
//
// Interface: "start" (a pulse while not busy) begins a run. "phase" shows
// the current phase; the counters report records stored, transitions
// fired, duplicates found, list records passed over and busy cycles.
module search_engine
  import pn_pkg::*;
#(
  parameter int N          = 100,
  parameter int TOKEN_BITS = 4,
  parameter int MEM_DEPTH  = 65536,
  parameter int HASH_BITS  = 10,
  localparam int PPW       = SIM_WORD_BITS / TOKEN_BITS,
  localparam int NW32      = (N + PPW - 1) / PPW,
  localparam int SAW       = (NW32 > 1) ? $clog2(NW32) : 1,
  localparam int WPS       = (NW32 + 1) / 2,
  localparam int REC_WORDS = WPS + 1,
  localparam int MAW       = $clog2(MEM_DEPTH),
  localparam int MAX_REC   = (MEM_DEPTH / REC_WORDS < (1 << REC_W)) ?
                             MEM_DEPTH / REC_WORDS : (1 << REC_W)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output err_t                     err,
  output phase_e                   phase,
  output logic [31:0]              n_states,
  output logic [31:0]              n_fires,
  output logic [31:0]              n_dups,
  output logic [31:0]              n_passed,
  output logic [31:0]              n_cycles,
  // simulator
  output logic                     sim_step,
  output logic                     sim_clear_fired,
  output logic                     sim_clear_err,
  output logic [SAW-1:0]           sim_rd_addr,
  input  logic [SIM_WORD_BITS-1:0] sim_rd_data,
  output logic                     sim_wr_en,
  output logic [SAW-1:0]           sim_wr_addr,
  output logic [SIM_WORD_BITS-1:0] sim_wr_data,
  input  logic                     sim_dct_out,
  input  logic                     sim_overflow,
  // state storage
  output logic [MAW-1:0]           mem_addr,
  output logic                     mem_we,
  output logic [MEM_WORD_BITS-1:0] mem_wdata,
  input  logic [MEM_WORD_BITS-1:0] mem_rdata,
  // hash pointer table
  output logic                     hash_clear,
  output logic [HASH_BITS-1:0]     hash_addr,
  output logic                     hash_we,
  output logic [REC_W-1:0]         hash_wr_head,
  input  logic                     hash_valid,
  input  logic [REC_W-1:0]         hash_head
);

  typedef logic [SIM_WORD_BITS-1:0] sword_t;

  phase_e           ph;
  logic [15:0]      widx;
  sword_t           newbuf [NW32];   // state just reached
  sword_t           curbuf [NW32];   // state being expanded
  sword_t           hacc;
  logic             init_q;
  logic             head_valid;
  logic [REC_W-1:0] head_rec;
  logic [REC_W-1:0] walk_rec;
  logic [REC_W-1:0] walk_next;
  logic             walk_has_next;
  logic [REC_W-1:0] cur_rec;
  logic [REC_W-1:0] scan_rec;
  logic [REC_W:0]   n_rec;

  logic [HASH_BITS-1:0] hcode;
  logic [NW32-1:0]      diff;
  logic [SAW-1:0]       diff_idx;
  rec_hdr_t             hdr_rd;
  rec_hdr_t             hdr_new;
  logic [MEM_WORD_BITS-1:0] cmp_word;

  // 64-bit storage word k of the new state (zero padded past NW32).
  function automatic logic [MEM_WORD_BITS-1:0] new_word(int k);
    logic [MEM_WORD_BITS-1:0] w;
    w = '0;
    for (int i = 0; i < NW32; i++) begin
      if (i == 2*k)     w[31:0]  = newbuf[i];
      if (i == 2*k + 1) w[63:32] = newbuf[i];
    end
    return w;
  endfunction

  function automatic logic [MAW-1:0] rec_base(logic [REC_W-1:0] r);
    return MAW'(r * REC_WORDS);
  endfunction

  // Hash code: the words are accumulated as hacc = rotl(hacc, 5) ^ word
  // while the state is read; the code is the top HASH_BITS bits of
  // hacc * 0x9E3779B1 (multiplicative hashing).
  localparam logic [SIM_WORD_BITS-1:0] HASH_MUL = 32'h9E37_79B1;
  logic [SIM_WORD_BITS-1:0] hprod;
  assign hprod = hacc * HASH_MUL;
  assign hcode = hprod[SIM_WORD_BITS-1 -: HASH_BITS];

  always_comb begin
    diff     = '0;
    diff_idx = '0;
    for (int w = 0; w < NW32; w++) diff[w] = (newbuf[w] != curbuf[w]);
    for (int w = NW32 - 1; w >= 0; w--) if (diff[w]) diff_idx = SAW'(w);
  end

  assign hdr_rd   = rec_hdr_t'(mem_rdata);
  assign cmp_word = new_word(int'(widx) - 1);

  always_comb begin
    hdr_new          = '0;
    hdr_new.has_next = head_valid;
    hdr_new.next     = head_rec;
    hdr_new.has_pred = !init_q;
    hdr_new.pred     = cur_rec;
  end

  // Port drive per phase.
  always_comb begin
    sim_step        = 1'b0;
    sim_clear_fired = 1'b0;
    sim_clear_err   = 1'b0;
    sim_rd_addr     = '0;
    sim_wr_en       = 1'b0;
    sim_wr_addr     = '0;
    sim_wr_data     = '0;
    mem_addr        = '0;
    mem_we          = 1'b0;
    mem_wdata       = '0;
    hash_clear      = 1'b0;
    hash_addr       = hcode;
    hash_we         = 1'b0;
    hash_wr_head    = n_rec[REC_W-1:0];
    unique case (ph)
      PH_IDLE, PH_DONE, PH_ERROR: begin
        if (start) begin
          hash_clear      = 1'b1;
          sim_clear_err   = 1'b1;
          sim_clear_fired = 1'b1;
        end
      end
      PH_FIRE:   sim_step = !sim_dct_out && !sim_overflow;
      PH_READ:   sim_rd_addr = SAW'(widx);
      PH_HASH:   ;
      PH_SEARCH: mem_addr = rec_base(walk_rec) + MAW'(widx);
      PH_STORE: begin
        mem_addr  = rec_base(n_rec[REC_W-1:0]) + MAW'(widx);
        mem_we    = 1'b1;
        mem_wdata = (widx == 0) ? MEM_WORD_BITS'(hdr_new) : cmp_word;
        hash_we   = (widx == 0);
      end
      PH_RESTORE: begin
        sim_wr_en   = |diff;
        sim_wr_addr = diff_idx;
        sim_wr_data = curbuf[diff_idx];
      end
      PH_COMPLETE: begin
        mem_addr  = rec_base(cur_rec);
        mem_we    = 1'b1;
        mem_wdata = mem_rdata | MEM_WORD_BITS'({1'b1, {(MEM_WORD_BITS-1){1'b0}}});
      end
      PH_CHOOSE: mem_addr = rec_base(scan_rec);
      PH_LOAD: begin
        mem_addr        = rec_base(cur_rec) + MAW'(32'd1 + 32'(widx >> 1));
        sim_wr_en       = 1'b1;
        sim_wr_addr     = SAW'(widx);
        sim_wr_data     = widx[0] ? mem_rdata[63:32] : mem_rdata[31:0];
        sim_clear_fired = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph            <= PH_IDLE;
      widx          <= '0;
      hacc          <= '0;
      init_q        <= 1'b0;
      head_valid    <= 1'b0;
      head_rec      <= '0;
      walk_rec      <= '0;
      walk_next     <= '0;
      walk_has_next <= 1'b0;
      cur_rec       <= '0;
      scan_rec      <= '0;
      n_rec         <= '0;
      err           <= '0;
      n_fires       <= '0;
      n_dups        <= '0;
      n_passed      <= '0;
      n_cycles      <= '0;
    end else begin
      if (busy) n_cycles <= n_cycles + 1;
      unique case (ph)
        PH_IDLE, PH_DONE, PH_ERROR: begin
          if (start) begin
            ph       <= PH_READ;
            widx     <= '0;
            hacc     <= '0;
            init_q   <= 1'b1;
            n_rec    <= '0;
            scan_rec <= '0;
            cur_rec  <= '0;
            err      <= '0;
            n_fires  <= '0;
            n_dups   <= '0;
            n_passed <= '0;
            n_cycles <= '0;
          end
        end
        PH_FIRE: begin
          if (sim_overflow) begin
            err.token_overflow <= 1'b1;
            ph <= PH_ERROR;
          end else if (sim_dct_out) begin
            ph <= PH_COMPLETE;
          end else begin
            n_fires <= n_fires + 1;
            widx    <= '0;
            hacc    <= '0;
            ph      <= PH_READ;
          end
        end
        PH_READ: begin
          hacc <= {hacc[SIM_WORD_BITS-6:0], hacc[SIM_WORD_BITS-1 -: 5]} ^ sim_rd_data;
          widx <= widx + 1;
          if (int'(widx) == NW32 - 1) ph <= PH_HASH;
        end
        PH_HASH: begin
          head_valid <= hash_valid;
          head_rec   <= hash_head;
          walk_rec   <= hash_head;
          widx       <= '0;
          if (sim_overflow) begin
            err.token_overflow <= 1'b1;
            ph <= PH_ERROR;
          end else if (hash_valid) begin
            ph <= PH_SEARCH;
          end else if (int'(n_rec) >= MAX_REC) begin
            err.storage_full <= 1'b1;
            ph <= PH_ERROR;
          end else begin
            ph <= PH_STORE;
          end
        end
        PH_SEARCH: begin
          if (widx == 0) begin
            walk_next     <= hdr_rd.next;
            walk_has_next <= hdr_rd.has_next;
            widx          <= 16'd1;
          end else if (mem_rdata != cmp_word) begin
            n_passed <= n_passed + 1;
            widx     <= '0;
            if (walk_has_next) begin
              walk_rec <= walk_next;
            end else if (int'(n_rec) >= MAX_REC) begin
              err.storage_full <= 1'b1;
              ph <= PH_ERROR;
            end else begin
              ph <= PH_STORE;
            end
          end else if (int'(widx) == WPS) begin
            n_dups <= n_dups + 1;
            ph     <= PH_RESTORE;
          end else begin
            widx <= widx + 1;
          end
        end
        PH_STORE: begin
          widx <= widx + 1;
          if (int'(widx) == WPS) begin
            n_rec  <= n_rec + 1;
            init_q <= 1'b0;
            ph     <= init_q ? PH_CHOOSE : PH_RESTORE;
          end
        end
        PH_RESTORE: begin
          // leave with the last differing word (or at once if none)
          if ((diff & (diff - 1'b1)) == '0) ph <= PH_FIRE;
        end
        PH_COMPLETE: ph <= PH_CHOOSE;
        PH_CHOOSE: begin
          if ({1'b0, scan_rec} == n_rec) begin
            ph <= PH_DONE;
          end else if (hdr_rd.c_flag) begin
            scan_rec <= scan_rec + 1;
          end else begin
            cur_rec <= scan_rec;
            widx    <= '0;
            ph      <= PH_LOAD;
          end
        end
        PH_LOAD: begin
          widx <= widx + 1;
          if (int'(widx) == NW32 - 1) ph <= PH_FIRE;
        end
        default: ph <= PH_IDLE;
      endcase
    end
  end

  // State buffers: plain registers, written before they are read.
  always_ff @(posedge clk) begin
    if (ph == PH_READ) newbuf[widx[SAW-1:0]] <= sim_rd_data;
    if (ph == PH_RESTORE && |diff) newbuf[diff_idx] <= curbuf[diff_idx];
    if (ph == PH_LOAD) begin
      newbuf[widx[SAW-1:0]] <= sim_wr_data;
      curbuf[widx[SAW-1:0]] <= sim_wr_data;
    end
  end

  assign phase    = ph;
  assign busy     = !(ph inside {PH_IDLE, PH_DONE, PH_ERROR});
  assign done     = (ph == PH_DONE);
  assign n_states = 32'(n_rec);

  // The engine only strobes the simulator when a transition is fireable.
  a_step_fireable: assert property (@(posedge clk) disable iff (!rst_n)
    sim_step |-> !sim_dct_out);
  // Records are only written inside the storage.
  a_store_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (ph == PH_STORE) |-> (int'(n_rec) < MAX_REC));

endmodule
