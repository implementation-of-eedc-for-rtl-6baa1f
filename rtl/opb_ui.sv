// opb_ui: user interface between the OPB and the controller host interface.
//
// An OPB slave: a transfer addressed to the window C_BASEADDR .. +64 KiB is
// taken when OPB_select is high with the address. The address is held on
// reg_addr for the whole transfer. Writes reach the register bus as a
// one-clock reg_wr; reads capture reg_rdata two clocks after the address
// is presented. Sl_xferAck is given for one clock three clocks after the
// transfer is taken, with Sl_DBus holding read data during the acknowledge
// and zero otherwise (OPB slaves drive an OR-ed bus). Addresses outside the
// window are ignored.
//
// Interrupt management is done here: the CHI's one-clock event pulses set
// bits of the interrupt status register (ISR, address 0x008, write 1 to
// clear); the enable register (IER, 0x00C) selects which of them raise the
// level interrupt 'irq'. The UI answers these two addresses itself.
//
// The document says the UI gives OPB connectivity, performs OPB read/write
// transactions and manages interrupts; the timing, the window size and the
// ISR/IER scheme are this design's own.
module opb_ui #(
  parameter logic [31:0] C_BASEADDR = 32'h8000_0000,
  parameter int unsigned N_EVENTS   = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  // OPB slave
  input  logic                OPB_select,
  input  logic                OPB_RNW,
  input  logic [31:0]         OPB_ABus,
  input  logic [31:0]         OPB_DBus,
  output logic [31:0]         Sl_DBus,
  output logic                Sl_xferAck,
  // interrupt
  input  logic [N_EVENTS-1:0] events,
  output logic                irq,
  // register bus to the CHI
  output logic                reg_wr,
  output logic [15:0]         reg_addr,
  output logic [31:0]         reg_wdata,
  input  logic [31:0]         reg_rdata
);

  typedef enum logic [1:0] {U_IDLE, U_ACCESS, U_CAPTURE, U_ACK} ustate_t;

  ustate_t             st;
  logic                rnw;
  logic [31:0]         rdata_q;
  logic [N_EVENTS-1:0] isr, ier;
  logic                in_window, local_reg;

  assign in_window = (OPB_ABus[31:16] == C_BASEADDR[31:16]);
  assign local_reg = (reg_addr == 16'h008) || (reg_addr == 16'h00C);
  assign irq       = |(isr & ier);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= U_IDLE;
      rnw        <= 1'b0;
      reg_addr   <= '0;
      reg_wdata  <= '0;
      reg_wr     <= 1'b0;
      rdata_q    <= '0;
      Sl_DBus    <= '0;
      Sl_xferAck <= 1'b0;
      isr        <= '0;
      ier        <= '0;
    end else begin
      reg_wr     <= 1'b0;
      Sl_xferAck <= 1'b0;
      Sl_DBus    <= '0;
      isr        <= isr | events;
      unique case (st)
        U_IDLE:
          if (OPB_select && in_window) begin
            st        <= U_ACCESS;
            rnw       <= OPB_RNW;
            reg_addr  <= OPB_ABus[15:0];
            reg_wdata <= OPB_DBus;
          end
        U_ACCESS: begin
          st <= U_CAPTURE;
          if (!local_reg) begin
            reg_wr <= !rnw;
          end else if (!rnw) begin
            if (reg_addr == 16'h008) isr <= (isr & ~reg_wdata[N_EVENTS-1:0]) | events;
            else                     ier <= reg_wdata[N_EVENTS-1:0];
          end
        end
        U_CAPTURE: begin
          st <= U_ACK;
          if (reg_addr == 16'h008)      rdata_q <= 32'(isr);
          else if (reg_addr == 16'h00C) rdata_q <= 32'(ier);
          else                          rdata_q <= reg_rdata;
        end
        U_ACK: begin
          Sl_xferAck <= 1'b1;
          Sl_DBus    <= rnw ? rdata_q : 32'd0;
          st         <= U_IDLE;
        end
        default: st <= U_IDLE;
      endcase
    end
  end

endmodule
