// ecc_ram: single-port system RAM with a "smart" SECDED wrapper.
//
// Every write stores the 32-bit word as a 39-bit Hamming codeword
// (secded_pkg). Every read is decoded: a single flipped bit is corrected in
// the returned data and, in the cycle the data is returned, the corrected
// codeword is written back to the same address, so upsets do not accumulate in
// the array. Two flipped bits are flagged (ded) and left alone. With
// ecc_bypass high the raw stored data bits are returned, nothing is corrected
// or written back and both flags stay low - the mode used to measure the bare
// array's sensitivity.
//
// Interface: one request per cycle when ready is high (req, we, addr, wdata).
// A read returns rdata, rvalid, sec and ded one cycle after the request. ready
// drops for exactly that cycle when a correction is being written back; a
// request offered then is not taken and must be held. rst_n only clears the
// control state: the array itself holds whatever was last written.
//
// Size: 2**ADDR_W words of 32 bits; the default 8192 words is the 32 Kbyte
// system RAM. The SECDED scheme, the write-back and the bypass come from the
// design description; the code's bit layout, the one-cycle read latency and
// the request/ready handshake are this design's own.
//
// The array is written from a plain `always` process, not `always_ff`, so
// fault-injection testbenches may flip stored bits from another process.
module ecc_ram
  import secded_pkg::*;
#(
  parameter int unsigned ADDR_W = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  data_t             wdata,
  input  logic              ecc_bypass,
  output logic              ready,
  output logic              rvalid,
  output data_t             rdata,
  output logic              sec,
  output logic              ded
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned DEPTH = 1 << ADDR_W;

  cw_t               mem [DEPTH];
  cw_t               rd_cw;
  logic [ADDR_W-1:0] rd_addr;
  logic              rd_bypass;
  dec_t              dec;
  logic              writeback;
  logic              do_write;

  always_comb begin
    dec       = decode(rd_cw);
    writeback = rvalid && !rd_bypass && dec.sec;
    ready     = !writeback;
    rdata     = rd_bypass ? extract(rd_cw) : dec.data;
    sec       = rvalid && !rd_bypass && dec.sec;
    ded       = rvalid && !rd_bypass && dec.ded;
    do_write  = req && we && ready;
  end

  // The array: a write request, or the write-back of a corrected word.
  always @(posedge clk) begin
    if (writeback)     mem[rd_addr] <= dec.cw;
    else if (do_write) mem[addr]    <= encode(wdata);
  end

  always_ff @(posedge clk) begin
    if (req && !we && ready) begin
      rd_cw     <= mem[addr];
      rd_addr   <= addr;
      rd_bypass <= ecc_bypass;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= req && !we && ready;
  end
endmodule
