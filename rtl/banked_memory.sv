// banked_memory: codeword memory split into BANKS banks on a common address.
//
// A word address a lives in bank a / BANK_WORDS at row a % BANK_WORDS; the
// row is the common address shared by all banks (a shift and a mask when
// BANK_WORDS is a power of two). A write is steered to the selected bank only; on a
// read every bank reads the common row and a mux picks the selected bank's
// word using the bank index registered with the read. The bank organisation
// with a common address, a codeword demux and a read mux is the document's;
// the 4-bank default follows its drawing, and the default bank of 69906
// 15-bit words is the smallest that holds 1 Mb (2^20 bits).
// Interface and timing are those of mem_bank: q valid one cycle after re and
// held while re is low. The upset port is a fault-injection model.
module banked_memory #(
  parameter int unsigned BANKS      = 4,
  parameter int unsigned BANK_WORDS = 69906,
  parameter int unsigned W          = 15,
  localparam int unsigned RAW       = $clog2(BANK_WORDS),
  localparam int unsigned BW        = (BANKS > 1) ? $clog2(BANKS) : 1,
  localparam int unsigned AW        = $clog2(BANKS * BANK_WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  q,
  input  logic          ue,
  input  logic [AW-1:0] uaddr,
  input  logic [W-1:0]  umask
);

  logic [W-1:0]  bq [BANKS];
  logic [BW-1:0] rbank_q;

  function automatic logic [BW-1:0] bank_of(input logic [AW-1:0] a);
    return BW'(32'(a) / BANK_WORDS);
  endfunction

  function automatic logic [RAW-1:0] row_of(input logic [AW-1:0] a);
    return RAW'(32'(a) % BANK_WORDS);
  endfunction

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    mem_bank #(.WORDS(BANK_WORDS), .W(W)) u_bank (
      .clk  (clk),
      .we   (we && bank_of(waddr) == BW'(b)),
      .waddr(row_of(waddr)),
      .wdata(wdata),
      .re   (re),
      .raddr(row_of(raddr)),
      .q    (bq[b]),
      .ue   (ue && bank_of(uaddr) == BW'(b)),
      .uaddr(row_of(uaddr)),
      .umask(umask)
    );
  end

  always_ff @(posedge clk) if (re) rbank_q <= bank_of(raddr);

  assign q = bq[rbank_q];

endmodule
