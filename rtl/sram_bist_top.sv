// SRAM with parallel March C- built-in self test.
//
// A bit-oriented n-bit SRAM (sqrt(n) x sqrt(n) cells) seen as a grid of
// basic marching blocks of k bits (sqrt(k) x sqrt(k) cells). In test mode
// the BIST writes the same cell position of all n/k blocks in one cycle
// through mask address decoders, and reads that position one word line at
// a time, sqrt(n/k) cells per read, checking with a reference-free
// parallel comparator that they agree. March C- then needs
// 5*sqrt(k)*(sqrt(k)+sqrt(n)) cycles instead of 10*n.
//
// Blocks: bist_controller (bmbag, mdag, mag, signal_generator,
// data_generator), two mask_decoder instances (word lines, bit lines),
// sram_array, parallel_comparator.
//
// Ports:
//   tm           test mode. Low: normal mode, the memory is accessed
//                through addr/we/wdata/rdata and the comparator is
//                isolated. High: the BIST owns the array.
//   bist_start   one-cycle pulse with tm high starts a test run
//   addr         normal-mode address {row, column}, LOG2N bits
//   we, wdata    normal-mode write (on the rising clock edge)
//   rdata        normal-mode read data, combinational from addr
//   bist_busy, bist_done, bist_fail   test status (fail is sticky)
//   error_flag_n the comparator output: 0 in a test read that found a fault
//   bist_element the march element being run (see sram_bist_pkg)
//
// Default size: the document's 4 Mbit memory with 64 Kbit basic marching
// blocks (LOG2N = 22, LOG2K = 16). Both must be even and LOG2K <= LOG2N-2.
// The normal-mode port and the {row, column} address split are this
// design's choices. An assertion checks that every test read drives one
// word line and sqrt(n/k) bit lines.
module sram_bist_top
  import sram_bist_pkg::*;
#(
  parameter int unsigned LOG2N = 22,
  parameter int unsigned LOG2K = 16,
  localparam int unsigned RA   = LOG2N / 2,
  localparam int unsigned SIDE = 1 << RA
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tm,
  input  logic             bist_start,
  input  logic [LOG2N-1:0] addr,
  input  logic             we,
  input  logic             wdata,
  output logic             rdata,
  output logic             bist_busy,
  output logic             bist_done,
  output logic             bist_fail,
  output logic             error_flag_n,
  output march_elem_e      bist_element
);

  if (LOG2N % 2 != 0 || LOG2K % 2 != 0 || LOG2K + 2 > LOG2N) begin : g_bad_size
    $error("sram_bist_top: LOG2N and LOG2K must be even and LOG2K <= LOG2N-2");
  end

  logic [RA-1:0]   b_row, b_col, b_mask_row, b_mask_col;
  logic            b_we, b_wdata, cmp_en;
  logic [RA-1:0]   row_a, col_a, row_m, col_m;
  logic            arr_we, arr_wdata;
  logic [SIDE-1:0] wl, bl, sa;

  bist_controller #(.LOG2N(LOG2N), .LOG2K(LOG2K)) u_bist (
    .clk, .rst_n, .tm, .start(bist_start), .error_flag_n,
    .row_addr(b_row), .col_addr(b_col), .mask_row(b_mask_row), .mask_col(b_mask_col),
    .we(b_we), .wdata(b_wdata), .cmp_en, .elem(bist_element),
    .busy(bist_busy), .done(bist_done), .fail(bist_fail)
  );

  // Normal mode takes the external address with no mask.
  always_comb begin
    if (tm) begin
      row_a     = b_row;
      col_a     = b_col;
      row_m     = b_mask_row;
      col_m     = b_mask_col;
      arr_we    = b_we;
      arr_wdata = b_wdata;
    end else begin
      row_a     = addr[LOG2N-1:RA];
      col_a     = addr[RA-1:0];
      row_m     = '0;
      col_m     = '0;
      arr_we    = we;
      arr_wdata = wdata;
    end
  end

  mask_decoder #(.AW(RA)) u_row_dec (.addr(row_a), .mask(row_m), .sel(wl));
  mask_decoder #(.AW(RA)) u_col_dec (.addr(col_a), .mask(col_m), .sel(bl));

  sram_array #(.ROWS(SIDE), .COLS(SIDE)) u_array (
    .clk, .wl, .bl, .we(arr_we), .wdata(arr_wdata), .sa, .rdata
  );

  parallel_comparator #(.W(SIDE)) u_cmp (
    .en(cmp_en), .sa, .sel(bl), .error_flag_n
  );

  // A test read drives exactly one word line and sqrt(n/k) bit lines.
  a_read_sel: assert property (@(posedge clk)
    (tm && cmp_en) |-> ($onehot(wl) && $countones(bl) == (1 << ((LOG2N - LOG2K) / 2))));

endmodule
