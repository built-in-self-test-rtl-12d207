// Parallel March C- BIST controller.
//
// Runs March C- (up(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0);
// down(r0)) on every basic marching block of the memory at once.
//
// How it works: the block address counter (bmbag) holds the position of a
// cell inside a sqrt(k) x sqrt(k) basic marching block, and in its top bits
// the current march element. That position is driven onto the low row and
// low column address bits; the upper HB bits of both addresses, which pick
// the block, are masked by the mask address generator (mag) so the decoders
// select that position in every block. A write therefore reaches all n/k
// copies of the position in one cycle. A read can only use one word line,
// so for reads the row mask is cleared and the masked row address counter
// (mdag) supplies the upper row bits, one row group per cycle; the
// parallel comparator then checks the sqrt(n/k) cells of that row.
//
// Interface:
//   tm         test mode; when low the BIST is idle and its outputs do not
//              select anything (masks 0, no write, comparator isolated)
//   start      one-cycle pulse (with tm) that restarts the test
//   error_flag_n  parallel comparator output, sampled in read cycles
//   row_addr/col_addr, mask_row/mask_col, we, wdata: to the decoders and
//              write drivers; cmp_en enables the comparator (read cycle)
//   busy, done, fail: status; fail is sticky until the next start
// Timing: the start pulse is sampled on a clock edge; from the next cycle
// on there is one memory operation per cycle, 5*k + 5*sqrt(k)*sqrt(n) of
// them, and done (with fail final) rises right after the edge that ends
// the last one. done stays high until the next start. Assertions check
// that no cycle both reads and writes and that reads leave the row mask
// clear.
//
// The counters, the mask generator, the split of the address bits and the
// operation count follow the document. The placement of the row bits above
// the column bits inside the block address, the start/busy/done/fail
// handshake and the sticky fail flag are this design's choices.
module bist_controller
  import sram_bist_pkg::*;
#(
  parameter int unsigned LOG2N = 22,  // memory of n = 2^LOG2N bits
  parameter int unsigned LOG2K = 16,  // basic marching block of k = 2^LOG2K bits
  localparam int unsigned RA   = LOG2N / 2,            // row (and column) address bits
  localparam int unsigned LB   = LOG2K / 2,            // in-block row/column bits
  localparam int unsigned HB   = (LOG2N - LOG2K) / 2   // block-select bits
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tm,
  input  logic          start,
  input  logic          error_flag_n,
  output logic [RA-1:0] row_addr,
  output logic [RA-1:0] col_addr,
  output logic [RA-1:0] mask_row,
  output logic [RA-1:0] mask_col,
  output logic          we,
  output logic          wdata,
  output logic          cmp_en,
  output march_elem_e   elem,
  output logic          busy,
  output logic          done,
  output logic          fail
);

  logic             id, a, b;
  logic [LOG2K-1:0] blk_addr;
  logic             c;
  logic [HB-1:0]    mrow;
  logic             started;       // a test has been started since reset
  logic             run;
  logic             go;
  logic             op_read, op_write;
  logic             bm_reset, bm_set, bm_cu, bm_cd;
  logic             md_reset, md_set, md_cu, md_cd;
  logic             el_done;
  logic [HB-1:0]    mag_row, mag_col;

  assign go   = tm && start;
  assign run  = tm && started;
  assign elem = march_elem_e'({id, a, b});

  bmbag #(.LOG2K(LOG2K)) u_bmbag (
    .clk, .rst_n,
    .reset(bm_reset), .set(bm_set), .cu(bm_cu), .cd(bm_cd),
    .id, .a, .b, .addr(blk_addr)
  );

  mdag #(.LOG2N(LOG2N), .LOG2K(LOG2K)) u_mdag (
    .clk, .rst_n,
    .reset(md_reset), .set(md_set), .cu(md_cu), .cd(md_cd),
    .c, .addr(mrow)
  );

  signal_generator #(.LOG2N(LOG2N), .LOG2K(LOG2K)) u_sig (
    .run, .start(go), .elem, .blk_addr, .c, .row_addr(mrow),
    .op_read, .op_write,
    .bmbag_reset(bm_reset), .bmbag_set(bm_set), .bmbag_cu(bm_cu), .bmbag_cd(bm_cd),
    .mdag_reset(md_reset), .mdag_set(md_set), .mdag_cu(md_cu), .mdag_cd(md_cd),
    .done(el_done)
  );

  mag #(.HB(HB)) u_mag (
    .tm, .rm(op_read), .mask_col(mag_col), .mask_row(mag_row)
  );

  data_generator u_dgen (
    .elem, .wdata
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started <= 1'b0;
      fail    <= 1'b0;
    end else if (go) begin
      started <= 1'b1;
      fail    <= 1'b0;
    end else begin
      if (op_read && !error_flag_n) fail <= 1'b1;
    end
  end

  always_comb begin
    row_addr = {mrow, blk_addr[LOG2K-1:LB]};
    col_addr = {HB'(0), blk_addr[LB-1:0]};
    mask_row = {mag_row, LB'(0)};
    mask_col = {mag_col, LB'(0)};
    we       = op_write;
    cmp_en   = op_read;
    busy     = started && !el_done;
    done     = started && el_done;
  end

  // A cycle carries at most one memory operation.
  a_one_op: assert property (@(posedge clk) !(op_read && op_write));
  // A read keeps the row unmasked, so it uses a single word line.
  a_read_row: assert property (@(posedge clk) op_read |-> mask_row == '0);

endmodule
