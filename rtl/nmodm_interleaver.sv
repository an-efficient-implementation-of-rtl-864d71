// nmodm_interleaver: two-page block interleaver with the N mod M permutation.
//
// Output bit position x (1..SIZE) carries input bit position
// F(x) = (x * N) mod M with M = SIZE + 1.  For the forward link SIZE = 384
// (one 20 ms frame of 24 x 16 symbols), M = 385 and N = 18; since N and M are
// coprime, F is a permutation of 1..SIZE.  For example output position 10
// carries input position 180.
//
// Two pages of SIZE entries alternate: while one is written in arrival order
// the other is read in permuted order.  The read address is kept as a
// register f = F(x) and advanced by adding N modulo M, so no table and no
// multiplier is needed.  A page becomes readable when completely written and
// writable again when completely read.
//
// Interface: valid/ready streams.  Each input transfer writes IN_SYMS
// consecutive positions (in_data[0] first), each output transfer reads
// OUT_SYMS consecutive output positions (out_data[0] first).  Each entry is W
// bits wide.  SIZE must be a multiple of IN_SYMS and OUT_SYMS.  The
// permutation, the page size and the two pages follow the document; the
// handshake and the multi-symbol ports are this design's.
module nmodm_interleaver #(
  parameter int unsigned SIZE     = 384,
  parameter int unsigned N        = 18,
  parameter int unsigned IN_SYMS  = 2,
  parameter int unsigned OUT_SYMS = 1,
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
  logic [AW-1:0] wr_pos;        // next input position - 1
  logic [AW-1:0] rd_cnt;        // output positions already read
  logic [AW-1:0] f;             // F(x) of the next output position
  logic [AW-1:0] fa [OUT_SYMS]; // F of the OUT_SYMS positions read now

  assign in_ready  = !full[wr_page];
  assign out_valid = full[rd_page];

  always_comb begin
    fa[0] = f;
    for (int i = 1; i < int'(OUT_SYMS); i++)
      fa[i] = AW'(nmodm_next(int'(fa[i-1]), N, M));
    for (int i = 0; i < int'(OUT_SYMS); i++)
      out_data[i*W +: W] = mem[rd_page][fa[i] - 1'b1];
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready)
      for (int i = 0; i < int'(IN_SYMS); i++)
        mem[wr_page][wr_pos + AW'(i)] <= in_data[i*W +: W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= '0;
      wr_page <= 1'b0;
      rd_page <= 1'b0;
      wr_pos  <= '0;
      rd_cnt  <= '0;
      f       <= AW'(N % M);
    end else begin
      if (in_valid && in_ready) begin
        if (wr_pos == AW'(SIZE - IN_SYMS)) begin
          wr_pos        <= '0;
          full[wr_page] <= 1'b1;
          wr_page       <= !wr_page;
        end else begin
          wr_pos <= wr_pos + AW'(IN_SYMS);
        end
      end
      if (out_valid && out_ready) begin
        f <= AW'(nmodm_next(int'(fa[OUT_SYMS-1]), N, M));
        if (rd_cnt == AW'(SIZE - OUT_SYMS)) begin
          rd_cnt        <= '0;
          f             <= AW'(N % M);
          full[rd_page] <= 1'b0;
          rd_page       <= !rd_page;
        end else begin
          rd_cnt <= rd_cnt + AW'(OUT_SYMS);
        end
      end
    end
  end
endmodule
