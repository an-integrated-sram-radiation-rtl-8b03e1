// serial_if: daisy-chainable serial interface that turns shifted-in frames
// into SRAM core reads and writes. All of its registers are TMR protected.
//
// A frame is {cmd[1:0], addr[10:0], data[15:0]} (29 bits, radmon_pkg::frame_t),
// shifted MSB first. While the controller is idle, every clock edge with sen
// high shifts sdi into the LSB of the shift register; sdo is its MSB, so the
// shift registers of several chips in a chain form one long register.
// A clock edge with load high (and the controller idle) starts the frame:
//   edge L   : frame copied to the command register, state EXEC
//   edge L+1 : Read or Write asserted to the core during this cycle
//              (write done / read data latched at this edge), state CAPT
//   edge L+2 : Out Enable asserted during this cycle; the shift register is
//              loaded with the response {cmd, addr, data}, where data is the
//              read word for CMD_READ and the written word otherwise; idle.
// sen and load are ignored while busy; the host must wait two clock cycles
// after load before shifting again. The response shifts out while the next
// frame shifts in. All chips in a chain share clk, sen and load.
// Serial communication, daisy chaining and TMR follow the chip description;
// the frame layout, the sen/load pins and the three-cycle sequence are this
// design's choices.
module serial_if
  import radmon_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sen,
  input  logic              load,
  input  logic              sdi,
  output logic              sdo,
  output logic [ADDR_W-1:0] core_addr,
  output logic              core_rd,
  output logic              core_wr,
  output logic [WORD_W-1:0] core_din,
  output logic              core_oe,
  input  logic [WORD_W-1:0] core_dout
);
  frame_t     sr_q, sr_d, cmd_q;
  sif_state_e st_q, st_d;
  logic       sr_en, cmd_en;
  logic [1:0] st_raw;

  // Shift register (the chain element).
  tmr_reg #(.WIDTH(FRAME_W)) u_sr (
    .clk(clk), .rst_n(rst_n), .en(sr_en), .d(sr_d), .q(sr_q)
  );

  // Frame under execution.
  tmr_reg #(.WIDTH(FRAME_W)) u_cmd (
    .clk(clk), .rst_n(rst_n), .en(cmd_en), .d(sr_q), .q(cmd_q)
  );

  // Controller state.
  tmr_reg #(.WIDTH(2), .RESET_VAL(S_IDLE)) u_state (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(st_d), .q(st_raw)
  );

  always_comb st_q = sif_state_e'(st_raw);

  always_comb begin
    st_d   = st_q;
    sr_en  = 1'b0;
    sr_d   = sr_q;
    cmd_en = 1'b0;
    unique case (st_q)
      S_IDLE: begin
        if (load) begin
          cmd_en = 1'b1;
          st_d   = S_EXEC;
        end else if (sen) begin
          sr_en = 1'b1;
          sr_d  = frame_t'({sr_q[FRAME_W-2:0], sdi});
        end
      end
      S_EXEC: st_d = S_CAPT;
      S_CAPT: begin
        st_d       = S_IDLE;
        sr_en      = 1'b1;
        sr_d       = cmd_q;
        if (cmd_q.cmd == CMD_READ) sr_d.data = core_dout;
      end
      default: st_d = S_IDLE;
    endcase
  end

  always_comb begin
    sdo       = sr_q[FRAME_W-1];
    core_addr = cmd_q.addr;
    core_din  = cmd_q.data;
    core_rd   = (st_q == S_EXEC) && (cmd_q.cmd == CMD_READ);
    core_wr   = (st_q == S_EXEC) && (cmd_q.cmd == CMD_WRITE);
    core_oe   = (st_q == S_CAPT);
  end

  a_no_rd_wr: assert property (@(posedge clk) disable iff (!rst_n) !(core_rd && core_wr));
endmodule
