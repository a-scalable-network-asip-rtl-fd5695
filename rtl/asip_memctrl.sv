// asip_memctrl: byte-lane logic between the ASIP and one 4 KiB memory made of
// two Block RAMs configured 16 bits wide on the ASIP side.
//
// The memory is interleaved by halfword: even halfwords (byte addresses
// 4k..4k+1) live in bank 0, odd ones in bank 1. Any byte address a reads a
// 4 byte window, halfword a>>1 and the halfword after it, one from each bank.
// A 4 to 1 byte multiplexer then picks the value out of the window, so 8 and
// 16 bit accesses work at any byte address and 32 bit accesses at even
// addresses (the lowest address bit is ignored for 32 bit accesses). Data is
// big-endian (network order): the byte at the lowest address is the most
// significant.
//
// Request side (combinational, same cycle as the memory address): bank
// indices, byte enables and write data per bank. Response side
// (combinational, the cycle after): the window read back from the banks and
// the registered offset/size give the zero-extended value. The two-bank,
// 16 bit, 4 to 1 multiplexer organisation follows the architecture; the
// halfword interleave and byte order are this design's choices.
module asip_memctrl
  import asip_pkg::*;
(
  // request
  input  ptr_t        addr,
  input  size_e       size,
  input  bus_t        wdata,
  output logic [9:0]  idx0,      // bank 0 entry
  output logic [9:0]  idx1,      // bank 1 entry
  output logic [1:0]  be0,       // bank 0 byte enables {hi, lo}
  output logic [1:0]  be1,
  output logic [15:0] wd0,
  output logic [15:0] wd1,
  // response
  input  logic        r_odd,     // registered addr[0] (0 for 32 bit)
  input  logic        r_swapped, // registered addr[1]: window's first halfword is in bank 1
  input  size_e       r_size,
  input  logic [15:0] rd0,
  input  logic [15:0] rd1,
  output bus_t        rvalue
);

  logic [10:0] h0, h1;
  logic        odd;
  logic [3:0]  wbe;     // byte enables over the window, [3] = first byte
  bus_t        wwin;    // write data placed in the window

  assign h0  = addr[11:1];
  assign h1  = h0 + 11'd1;
  assign odd = addr[0] && (size != SZ32);

  always_comb begin
    wbe  = 4'b0000;
    wwin = '0;
    unique case (size)
      SZ8:  begin
        wbe  = odd ? 4'b0100 : 4'b1000;
        wwin = odd ? {8'd0, wdata[7:0], 16'd0} : {wdata[7:0], 24'd0};
      end
      SZ16: begin
        wbe  = odd ? 4'b0110 : 4'b1100;
        wwin = odd ? {8'd0, wdata[15:0], 8'd0} : {wdata[15:0], 16'd0};
      end
      default: begin
        wbe  = 4'b1111;
        wwin = wdata;
      end
    endcase
  end

  // first window halfword goes to the bank h0[0], second to the other bank
  always_comb begin
    if (!h0[0]) begin
      idx0 = h0[10:1];  be0 = wbe[3:2];  wd0 = wwin[31:16];
      idx1 = h1[10:1];  be1 = wbe[1:0];  wd1 = wwin[15:0];
    end else begin
      idx1 = h0[10:1];  be1 = wbe[3:2];  wd1 = wwin[31:16];
      idx0 = h1[10:1];  be0 = wbe[1:0];  wd0 = wwin[15:0];
    end
  end

  // response: rebuild the window and select the bytes (4 to 1 byte mux)
  bus_t rwin;
  assign rwin = r_swapped ? {rd1, rd0} : {rd0, rd1};

  always_comb begin
    unique case (r_size)
      SZ8:     rvalue = {24'd0, r_odd ? rwin[23:16] : rwin[31:24]};
      SZ16:    rvalue = {16'd0, r_odd ? rwin[23:8]  : rwin[31:16]};
      default: rvalue = rwin;
    endcase
  end

endmodule
