// nmodm_deinterleaver: receiver inverse of the N mod M interleaver.
//
// The x-th received symbol of a page (x = 1..SIZE) is the transmitter's input
// position F(x) = (x * N) mod M, M = SIZE + 1, so it is written to address
// F(x) - 1; the page is then read out in address order, which restores the
// encoder's order.  The write address is kept as a register advanced by N
// modulo M.  Two pages alternate as in the interleaver: one is written while
// the other is read.
//
// Interface: valid/ready streams; IN_SYMS received symbols per input transfer
// (in_data[0] first), OUT_SYMS decoder symbols per output transfer, W bits per
// entry (the forward link carries an erasure flag with each symbol).  The
// inverse mapping follows the document; ports and paging details are this
// design's.
module nmodm_deinterleaver #(
  parameter int unsigned SIZE     = 384,
  parameter int unsigned N        = 18,
  parameter int unsigned IN_SYMS  = 1,
  parameter int unsigned OUT_SYMS = 2,
  parameter int unsigned W        = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [IN_SYMS*W-1:0]  in_data,
  output logic                  in_ready,
  output logic                  out_valid,
  output logic [OUT_SYMS*W-1:0] out_data,
  input  logic                  out_ready
);
  import is95_pkg::nmodm_next;

  localparam int unsigned M  = SIZE + 1;
  localparam int AW = $clog2(M + 1);

  logic [W-1:0]  mem [2][SIZE];
  logic [1:0]    full;
  logic          wr_page, rd_page;
  logic [AW-1:0] wr_cnt;        // received positions already written
  logic [AW-1:0] f;             // F(x) of the next received position
  logic [AW-1:0] fa [IN_SYMS];
  logic [AW-1:0] rd_pos;

  assign in_ready  = !full[wr_page];
  assign out_valid = full[rd_page];

  always_comb begin
    fa[0] = f;
    for (int i = 1; i < int'(IN_SYMS); i++)
      fa[i] = AW'(nmodm_next(int'(fa[i-1]), N, M));
    for (int i = 0; i < int'(OUT_SYMS); i++)
      out_data[i*W +: W] = mem[rd_page][rd_pos + AW'(i)];
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready)
      for (int i = 0; i < int'(IN_SYMS); i++)
        mem[wr_page][fa[i] - 1'b1] <= in_data[i*W +: W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= '0;
      wr_page <= 1'b0;
      rd_page <= 1'b0;
      wr_cnt  <= '0;
      rd_pos  <= '0;
      f       <= AW'(N % M);
    end else begin
      if (in_valid && in_ready) begin
        f <= AW'(nmodm_next(int'(fa[IN_SYMS-1]), N, M));
        if (wr_cnt == AW'(SIZE - IN_SYMS)) begin
          wr_cnt        <= '0;
          f             <= AW'(N % M);
          full[wr_page] <= 1'b1;
          wr_page       <= !wr_page;
        end else begin
          wr_cnt <= wr_cnt + AW'(IN_SYMS);
        end
      end
      if (out_valid && out_ready) begin
        if (rd_pos == AW'(SIZE - OUT_SYMS)) begin
          rd_pos        <= '0;
          full[rd_page] <= 1'b0;
          rd_page       <= !rd_page;
        end else begin
          rd_pos <= rd_pos + AW'(OUT_SYMS);
        end
      end
    end
  end
endmodule
