// slave_mem: the slave IP core used as the system target, a synchronous memory
// of 8 KB ROM and 8 KB RAM (32-bit words). Physical address bit 13 selects the
// RAM (1) or the ROM (0), bits [12:2] the word; bits [15:14] and [1:0] are not
// decoded. Timing: an access presented with ce is latched on the next edge and
// answered on the edge after that (mem_ack with read data), two clocks in all,
// one access per clock. Writes honour the byte enables; a write to the ROM is
// not performed and answered with err. The ROM image is generated by a formula
// (word i, an 11-bit index, holds {~i, 5'b10101, 5'b00000, i}) since no
// program image is part of this design. Sizes and latency follow the design.
//
// Lint: address bits [15:14] and [1:0] are not decoded (unused-bits warning).
module slave_mem
  import ocp_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               ce,
  input  logic               we,
  input  logic [BE_W-1:0]    be,
  input  logic [PADDR_W-1:0] addr,
  input  logic [DATA_W-1:0]  wdata,
  output logic               ack,
  output logic               err,
  output logic [DATA_W-1:0]  rdata
);
  localparam int WORDS = 2048;   // 8 KB of 32-bit words per array

  logic [DATA_W-1:0] ram [WORDS];

  logic               s_ce, s_we;
  logic [BE_W-1:0]    s_be;
  logic [PADDR_W-1:0] s_addr;
  logic [DATA_W-1:0]  s_wdata;
  logic [10:0]        s_word;
  logic               s_ram;

  function automatic logic [DATA_W-1:0] rom_word(logic [10:0] i);
    return {~i, 5'b10101, 5'd0, i};
  endfunction

  assign s_word = s_addr[12:2];
  assign s_ram  = s_addr[13];

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      s_ce <= 1'b0; s_we <= 1'b0; s_be <= '0; s_addr <= '0; s_wdata <= '0;
    end else begin
      s_ce <= ce;
      s_we <= we;
      if (ce) begin
        s_be <= be; s_addr <= addr; s_wdata <= wdata;
      end
    end

  always_ff @(posedge clk)
    if (s_ce && s_we && s_ram)
      for (int b = 0; b < BE_W; b++)
        if (s_be[b]) ram[s_word][8*b +: 8] <= s_wdata[8*b +: 8];

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      ack <= 1'b0; err <= 1'b0; rdata <= '0;
    end else begin
      ack <= s_ce;
      err <= s_ce & s_we & ~s_ram;
      if (s_ce && !s_we) rdata <= s_ram ? ram[s_word] : rom_word(s_word);
    end
endmodule
