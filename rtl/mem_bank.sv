// mem_bank: one memory bank holding codewords.
//
// A WORDS x W array with one synchronous write port and one synchronous read
// port; q is loaded from the array when re is high and holds otherwise, which
// lets the read pipeline stall without losing the word. A third port flips
// the bits given by umask in a stored word: it models the transient upsets
// that accumulate in stored words and is meant for fault-injection tests
// (tie ue low in a real system). The document's bank is a nanowire crossbar;
// only its storage function is modelled here, and the ports are this design's.
// The default of 69906 words of 15 bits is the smallest bank holding 1 Mb.
// Timing: a write and an upset take effect at the clock edge; a read in the
// same cycle as a write to the same word returns the old word.
module mem_bank #(
  parameter int unsigned WORDS = 69906,
  parameter int unsigned W     = 15,
  localparam int unsigned AW   = $clog2(WORDS)
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

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (ue) mem[uaddr] <= mem[uaddr] ^ umask;
    if (re) q <= mem[raddr];
  end

endmodule
