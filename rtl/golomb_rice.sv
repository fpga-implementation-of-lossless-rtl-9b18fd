// golomb_rice: Golomb-Rice coding stage, with its data regulating part (the
// window register and its control) and its computing part (gr_encoder).
//
// Mapped errors are coded in windows of DEPTH values (40 in the source
// description), each window headed by its own K_W-bit parameter k. Because k
// depends on the whole window, a window is first collected in
// gr_window_buffer while its sum is accumulated; k is then the smallest
// value with DEPTH*2**k >= sum (this design's rule, shifts only). The
// buffer works as a delay line: while window j+1 arrives, each incoming
// value takes the slot of window j's value at the same position, which is
// coded with window j's k just before. So one DEPTH-entry register is enough
// and a window leaves the coder one window after it entered.
//
// Stream framing: the raw first sample (SAMPLE_W bits) is sent as it
// arrives. When the item flagged last has been taken, the coder drains: the
// rest of the previous window, then the header and values of the final,
// possibly partial, window (its k is computed over the values it holds).
// It then holds c_flush until the packer acknowledges with flush_ack.
//
// Timing: an item is taken in the cycle its codeword's last piece is sent,
// so short codewords run at one item per clock. A window header travels in
// the same piece as the window's first codeword when the two fit in
// CHUNK_W bits; otherwise it, like each extra piece of a long codeword,
// costs a cycle during which s_ready is low. Pieces go out on c_*
// (low c_len bits of c_bits, most significant first) and are never refused.
module golomb_rice
  import ecg_pkg::*;
#(
  parameter int unsigned DEPTH = 40,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned SUM_W = MAP_W + $clog2(DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // items from the prediction stage
  input  logic               s_valid,
  output logic               s_ready,
  input  alp_item_t          s_item,
  // pieces to the packer
  output logic               c_valid,
  output logic [CHUNK_W-1:0] c_bits,
  output logic [CLEN_W-1:0]  c_len,
  output logic               c_flush,
  input  logic               flush_ack,
  // monitoring
  output logic               mon_header,  // a window header is sent
  output logic               mon_hdr_merged, // ... sharing a piece with a codeword
  output kparam_t            mon_k,       // its k
  output logic               mon_split,   // a codeword piece of ones only
  output logic               mon_drain    // draining at the end of a stream
);

  typedef enum logic [2:0] {
    ST_RUN, ST_DRAIN_OLD, ST_DRAIN_HDR, ST_DRAIN_NEW, ST_FLUSH
  } state_e;

  state_e            state;
  logic [AW-1:0]     ptr;        // slot the next incoming value takes
  logic              have_prev;  // buffer holds a complete earlier window
  logic              hdr_done;   // its header has been sent
  kparam_t           k_prev;     // k of that window
  logic [SUM_W-1:0]  sum;        // sum of the window being collected
  logic [AW-1:0]     dptr;       // drain read position
  logic [AW:0]       dend;       // values in the final window
  kparam_t           k_new;      // k of the final window

  logic          we;
  logic [AW-1:0] raddr;
  mapped_t       rdata;

  logic          cw_valid, cw_done, enc_done, hdr_merge, enc_req;
  kparam_t       cw_k;
  logic          enc_valid;
  logic [CHUNK_W-1:0] enc_bits;
  logic [CLEN_W-1:0]  enc_len;

  gr_window_buffer #(.DEPTH(DEPTH)) u_buf (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(ptr), .wdata(s_item.value),
    .raddr(raddr), .rdata(rdata)
  );

  gr_encoder u_enc (
    .clk(clk), .rst_n(rst_n), .cw_valid(enc_req), .cw_m(rdata), .cw_k(cw_k),
    .chunk_take(cw_valid || hdr_merge),
    .cw_done(enc_done), .chunk_valid(enc_valid), .chunk_bits(enc_bits),
    .chunk_len(enc_len), .mon_split(mon_split)
  );

  // The encoder works on the slot addressed by raddr whenever a codeword may
  // be due; a piece is only sent (and the encoder advanced) when cw_valid or
  // hdr_merge is set.
  assign enc_req = (state == ST_DRAIN_OLD) || (state == ST_DRAIN_NEW) ||
                   (state == ST_RUN && s_valid && !s_item.first && have_prev);
  assign cw_done = cw_valid && enc_done;
  assign mon_hdr_merged = hdr_merge;

  // Data regulating control.
  always_comb begin
    hdr_merge  = 1'b0;
    s_ready    = 1'b0;
    we         = 1'b0;
    raddr      = ptr;
    cw_valid   = 1'b0;
    cw_k       = k_prev;
    c_valid    = 1'b0;
    c_bits     = '0;
    c_len      = '0;
    c_flush    = 1'b0;
    mon_header = 1'b0;
    mon_k      = k_prev;
    mon_drain  = (state != ST_RUN);
    unique case (state)
      ST_RUN: begin
        if (s_valid) begin
          if (s_item.first) begin
            c_valid = 1'b1;
            c_bits  = CHUNK_W'(s_item.value[SAMPLE_W-1:0]);
            c_len   = CLEN_W'(SAMPLE_W);
            s_ready = 1'b1;
          end else if (!have_prev) begin
            we      = 1'b1;
            s_ready = 1'b1;
          end else if (ptr == '0 && !hdr_done) begin
            // Window header: merged with the window's first codeword when
            // both fit in one piece, otherwise sent on its own.
            mon_header = 1'b1;
            if (enc_done && 32'(enc_len) + K_W <= CHUNK_W) begin
              hdr_merge = 1'b1;
              we        = 1'b1;
              s_ready   = 1'b1;
            end else begin
              c_valid = 1'b1;
              c_bits  = CHUNK_W'(k_prev);
              c_len   = CLEN_W'(K_W);
            end
          end else begin
            cw_valid = 1'b1;
            we       = cw_done;
            s_ready  = cw_done;
          end
        end
      end
      ST_DRAIN_OLD: begin
        raddr    = dptr;
        cw_valid = 1'b1;
      end
      ST_DRAIN_HDR: begin
        c_valid    = 1'b1;
        c_bits     = CHUNK_W'(k_new);
        c_len      = CLEN_W'(K_W);
        mon_header = 1'b1;
        mon_k      = k_new;
      end
      ST_DRAIN_NEW: begin
        raddr    = dptr;
        cw_valid = 1'b1;
        cw_k     = k_new;
      end
      default: c_flush = 1'b1;  // ST_FLUSH
    endcase
    if (cw_valid) begin
      c_valid = enc_valid;
      c_bits  = enc_bits;
      c_len   = enc_len;
    end
    if (hdr_merge) begin
      c_valid = 1'b1;
      c_bits  = enc_bits | (CHUNK_W'(k_prev) << enc_len);
      c_len   = enc_len + CLEN_W'(K_W);
    end
  end

  // Window bookkeeping after the item offered now is taken.
  logic             n_have;
  logic [AW-1:0]    n_ptr;
  logic [SUM_W-1:0] n_sum;
  kparam_t          n_k;
  logic             n_wrap;

  always_comb begin
    n_have = have_prev;
    n_ptr  = ptr;
    n_sum  = sum;
    n_k    = k_prev;
    n_wrap = 1'b0;
    if (!s_item.first) begin
      if (ptr == AW'(DEPTH - 1)) begin
        n_k    = select_k(32'(sum + SUM_W'(s_item.value)), DEPTH);
        n_have = 1'b1;
        n_sum  = '0;
        n_ptr  = '0;
        n_wrap = 1'b1;
      end else begin
        n_sum = sum + SUM_W'(s_item.value);
        n_ptr = ptr + AW'(1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_RUN;
      ptr       <= '0;
      have_prev <= 1'b0;
      hdr_done  <= 1'b0;
      k_prev    <= '0;
      sum       <= '0;
      dptr      <= '0;
      dend      <= '0;
      k_new     <= '0;
    end else begin
      unique case (state)
        ST_RUN: begin
          if (mon_header) hdr_done <= 1'b1;
          if (s_valid && s_ready) begin
            if (n_wrap) hdr_done <= 1'b0;
            have_prev <= n_have;
            ptr       <= n_ptr;
            sum       <= n_sum;
            k_prev    <= n_k;
            if (s_item.last) begin
              dptr  <= n_ptr;
              if (n_ptr != '0) begin
                dend  <= (AW + 1)'(n_ptr);
                k_new <= select_k(32'(n_sum), 32'(n_ptr));
              end else begin
                dend  <= (AW + 1)'(DEPTH);
                k_new <= n_k;
              end
              if (n_have && n_ptr != '0)   state <= ST_DRAIN_OLD;
              else if (n_have || n_ptr != '0) state <= ST_DRAIN_HDR;
              else                          state <= ST_FLUSH;
            end
          end
        end
        ST_DRAIN_OLD: begin
          if (cw_done) begin
            if (dptr == AW'(DEPTH - 1)) begin
              dptr  <= '0;
              state <= ST_DRAIN_HDR;
            end else begin
              dptr <= dptr + AW'(1);
            end
          end
        end
        ST_DRAIN_HDR: begin
          dptr  <= '0;
          state <= ST_DRAIN_NEW;
        end
        ST_DRAIN_NEW: begin
          if (cw_done) begin
            if ((AW + 1)'(dptr) == dend - (AW + 1)'(1)) state <= ST_FLUSH;
            else dptr <= dptr + AW'(1);
          end
        end
        default: begin  // ST_FLUSH
          if (flush_ack) begin
            state     <= ST_RUN;
            ptr       <= '0;
            have_prev <= 1'b0;
            hdr_done  <= 1'b0;
            sum       <= '0;
          end
        end
      endcase
    end
  end

endmodule
