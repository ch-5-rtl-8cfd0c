// store_align: control circuit between Drt and the data memory's Din.
//
// For SW the whole of Drt is written: wdata = Drt and all four byte enables
// are set. For SB only Drt bits 7-0 are stored: the byte is copied onto every
// lane of wdata and only the enable of the lane addressed by bits 1-0 is set,
// so the other three bytes of the memory word are left untouched (no
// read-modify-write). When `store` is low no enable is set. Lane 0 is bits
// 7-0 (little-endian), matching load_align. Combinational.
module store_align (
  input  logic [31:0] rt_data,
  input  logic [1:0]  byte_off,
  input  logic        store,
  input  logic        store_byte,
  output logic [31:0] wdata,
  output logic [3:0]  be
);

  always_comb begin
    if (store_byte) begin
      wdata = {4{rt_data[7:0]}};
      be    = 4'b0001 << byte_off;
    end else begin
      wdata = rt_data;
      be    = 4'b1111;
    end
    if (!store) be = 4'b0000;
  end

endmodule
