// isa_interface: the decoder's ISA bus slave and its writable registers.
//
// Decodes the 12-bit I/O address with AEN low. Writes (IOW low) reach
// 0x300..0x305, reads (IOR low) 0x300..0x304:
//   write 0x300 control word and interrupt clears (pcm_pkg::control_t)
//   write 0x301/0x302 OP_TIME end time low/high byte
//   write 0x303 OP_TIME resolution (2 bits)
//   write 0x304/0x305 SYNC word low/high byte (default 0xEB90)
//   read  0x300..0x304 through the read multiplexer (rd_sel, rd_data)
// The bus is taken as synchronous to the decoder clock (the ISA bus clock
// can serve as it). Bus inputs are registered each cycle and a write is
// committed in the cycle IOW goes high again, with the address and data
// sampled in the last cycle IOW was low. A read drives `data_oe` (the
// data-bus enable) combinationally for as long as IOR is low with a
// matching address.
// Control bits 0, 1, 5 and 6 act only in the write cycle: they give a
// one-cycle receiver reset, frame number reset, or clear the IRQ5/IRQ7
// request. Bits 2, 3, 4 and 7 are stored: run, IRQ5 enable, IRQ7 enable
// and line code. An IRQ request is set by its event whatever the enable
// (so status shows it) and drives its IRQ line only when enabled; an
// event in the same cycle as a clear wins.
// The register map, bus signals and control functions follow the
// specification; the bit positions in the control byte, the write timing
// and the request/enable split are this design's choices.
module isa_interface (
  input  logic        clk,
  input  logic        rst_n,
  // ISA bus
  input  logic        aen_n,
  input  logic        ior_n,
  input  logic        iow_n,
  input  logic [11:0] addr,
  input  logic [7:0]  data_in,
  output logic [7:0]  data_out,
  output logic        data_oe,
  output logic        irq5,
  output logic        irq7,
  // read path
  output logic [2:0]  rd_sel,
  input  logic [7:0]  rd_data,
  output logic        rd_frame_lo,
  // decoder registers
  output logic        mode,
  output logic        run,
  output logic        reset_receiver,
  output logic        reset_frame,
  output logic [17:0] op_time,
  output logic [15:0] sync_word,
  // interrupt events
  input  logic        byte_ready,
  input  logic        op_done,
  output logic        irq5_pending,
  output logic        irq7_pending
);
  import pcm_pkg::*;

  logic        aen_q, iow_q;
  logic [11:0] addr_q;
  logic [7:0]  data_q;
  logic        wr_commit;
  logic        en5, en7;
  control_t    ctl_wr;
  logic        clr5, clr7;

  assign wr_commit = !iow_q && iow_n && !aen_q &&
                     addr_q[11:3] == ISA_BASE[11:3] && addr_q[2:0] <= W_SYNC_HI;
  assign ctl_wr    = control_t'(data_q);
  assign clr5      = wr_commit && addr_q[2:0] == W_CONTROL && ctl_wr.clear_irq5;
  assign clr7      = wr_commit && addr_q[2:0] == W_CONTROL && ctl_wr.clear_irq7;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aen_q          <= 1'b1;
      iow_q          <= 1'b1;
      addr_q         <= '0;
      data_q         <= '0;
      mode           <= MODE_NRZ;
      run            <= 1'b0;
      en5            <= 1'b0;
      en7            <= 1'b0;
      reset_receiver <= 1'b0;
      reset_frame    <= 1'b0;
      op_time        <= '0;
      sync_word      <= DEFAULT_SYNC;
      irq5_pending   <= 1'b0;
      irq7_pending   <= 1'b0;
    end else begin
      aen_q          <= aen_n;
      iow_q          <= iow_n;
      addr_q         <= addr;
      data_q         <= data_in;
      reset_receiver <= 1'b0;
      reset_frame    <= 1'b0;
      if (wr_commit) begin
        unique case (addr_q[2:0])
          W_CONTROL: begin
            mode           <= ctl_wr.mode;
            run            <= ctl_wr.run;
            en5            <= ctl_wr.enable_irq5;
            en7            <= ctl_wr.enable_irq7;
            reset_receiver <= ctl_wr.reset_receiver;
            reset_frame    <= ctl_wr.reset_frame;
          end
          W_OPTIME_LO:  op_time[7:0]   <= data_q;
          W_OPTIME_HI:  op_time[15:8]  <= data_q;
          W_OPTIME_RES: op_time[17:16] <= data_q[1:0];
          W_SYNC_LO:    sync_word[7:0] <= data_q;
          W_SYNC_HI:    sync_word[15:8] <= data_q;
          default: ;
        endcase
      end
      if (byte_ready) irq5_pending <= 1'b1;
      else if (clr5)  irq5_pending <= 1'b0;
      if (op_done)    irq7_pending <= 1'b1;
      else if (clr7)  irq7_pending <= 1'b0;
    end
  end

  assign irq5 = irq5_pending && en5;
  assign irq7 = irq7_pending && en7;

  // read decode
  assign rd_sel      = addr[2:0];
  assign data_oe     = !aen_n && !ior_n && addr[11:3] == ISA_BASE[11:3] &&
                       addr[2:0] <= R_FRAME_HI;
  assign data_out    = data_oe ? rd_data : 8'h00;
  assign rd_frame_lo = data_oe && addr[2:0] == R_FRAME_LO;

  // A bus cycle never reads and writes at once.
  a_no_rd_wr: assert property (@(posedge clk) disable iff (!rst_n) !(!ior_n && !iow_n && !aen_n));
endmodule
