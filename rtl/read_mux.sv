// read_mux: the 5 x 8 read multiplexer.
//
// Selects which of the five readable bytes drives the ISA data bus, by the
// low three address bits of a read at 0x300..0x304: status, channel
// number, channel data, frame number low, frame number high. Other select
// values give 0x00. Purely combinational. The five inputs and their
// addresses follow the specified register map.
module read_mux (
  input  logic [2:0] sel,
  input  logic [7:0] status,
  input  logic [7:0] channel_num,
  input  logic [7:0] channel_data,
  input  logic [7:0] frame_lo,
  input  logic [7:0] frame_hi,
  output logic [7:0] dout
);
  import pcm_pkg::*;

  always_comb begin
    unique case (sel)
      R_STATUS:      dout = status;
      R_CHANNEL_NUM: dout = channel_num;
      R_CHANNEL_DAT: dout = channel_data;
      R_FRAME_LO:    dout = frame_lo;
      R_FRAME_HI:    dout = frame_hi;
      default:       dout = 8'h00;
    endcase
  end
endmodule
