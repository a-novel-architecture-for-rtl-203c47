// channel_memory: block-level organised channel (a-posteriori LLR) memory.
//
// The memory is split into NBANK banks (one per check node input, so that
// all dc LLRs of a row can be fetched in the same cycle). Each bank holds up
// to SLOTS circulants ("sub-banks") and is made of P single-port memories of
// SLOTS * ZP_MAX words; word (slot * Z/P + a) of memory m holds variable
// node a + m*(Z/P) of the circulant stored in that slot, so the P variable
// nodes needed by P parallel check nodes always sit in one word. Which
// circulant goes to which bank and slot is set by the controller's column
// map, so both the regular (equal slots per bank) and the irregular
// (unequal bank lengths) organisations are supported.
//
// Per bank and cycle: one read (en & !we, data on rdata one cycle later)
// or one write (en & we). Read data holds until the bank's next read.
// SLOTS = 5 covers the longest bank of the organisations given for the
// rate-1/2 codes; the array-of-registers memory model is this design's
// choice (a real chip would use SRAM macros with the same ports).
module channel_memory
  import ldpc_pkg::*;
#(
  parameter int unsigned NBANK  = 8,
  parameter int unsigned P      = 27,
  parameter int unsigned SLOTS  = 5,
  parameter int unsigned ZP_MAX = 3,
  localparam int unsigned DEPTH = SLOTS * ZP_MAX,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en    [NBANK],
  input  logic          we    [NBANK],
  input  logic [AW-1:0] addr  [NBANK],
  input  llr_t          wdata [NBANK][P],
  output llr_t          rdata [NBANK][P]
);

  llr_t mem [NBANK][P][DEPTH];

  always_ff @(posedge clk) begin
    for (int unsigned b = 0; b < NBANK; b++) begin
      if (en[b]) begin
        for (int unsigned m = 0; m < P; m++) begin
          if (we[b]) mem[b][m][addr[b]] <= wdata[b][m];
          else       rdata[b][m]        <= mem[b][m][addr[b]];
        end
      end
    end
  end

  // Every access must stay inside the bank.
  for (genvar b = 0; b < NBANK; b++) begin : g_chk
    a_addr: assert property (@(posedge clk) en[b] |-> (32'(addr[b]) < DEPTH));
  end

endmodule
