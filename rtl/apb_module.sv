// apb_module: lets the CPU run scan operations on the test data registers
// through a 16-bit APB register interface.
//
// The CPU writes an instruction, schedules capture/update actions and hands
// over shift data 16 bits at a time; the module serialises the data onto the
// shared scan input, deserialises the selected register's serial output and
// returns it through the Read register. It has its own instruction register,
// separate from the JTAG-Module's. Register map (16-bit words, byte address =
// 2 * index):
//   0 Instruction (R/W, IR_LEN bits)  selects the TDR, read/written in parallel
//   1 Action      (W, 2 bits)  bit0 = capture, bit1 = update; ORed into the
//                 pending set, executed update first, then capture
//   2 WriteF      (W, 16 bits) shift all 16 bits, LSB first
//   3 WriteP      (W, 16 bits) partial shift in first-zero encoding: data is
//                 MSB-aligned, followed by one 0 and then 1s down to bit 0;
//                 the shift enable stays low up to and including that 0
//   4 Read        (R, 16 bits) data shifted out by the last write, MSB-aligned
//   5 Control     (R/W, 1 bit) reserved, no function
//   6 Status      (R, 1 bit)   1 while busy, 0 when idle
//
// A state machine with the states Idle, Shift and Actions orders the work so
// that operations take effect in the order they were written. In Idle it
// applies a scheduled instruction first, then executes pending actions, then
// starts a pending write. An instruction written while the module is busy
// is held and applied when it returns to Idle. Shift takes 16 cycles per
// write (one per bit, bit 0 in the cycle that leaves Idle). Each action takes
// one cycle. Transfers that would break the order are stalled (PREADY low)
// instead of rejected: Instruction while actions are pending, Action while an
// instruction is pending, WriteF/WriteP while a write is pending or shifting
// or actions are pending or running, and Read while a write is pending or
// shifting. A write is only accepted with no actions pending, and it starts
// in the next cycle, before any later access can complete; so the usual
// sequence "capture; write; update" runs as capture, shift, update.
//
// Towards the TDRs the module drives a JTAG-TAP-Interface (`tap`; rise and
// fall are tied high because every system clock edge acts as both TCK edges)
// and one select per instruction it implements: IJTAG, SIB and EXCFG.
// Instruction codes without a TDR select nothing and read back zeros.
//
// From the design: the register map, the 16-bit bus, the state machine with
// its transition conditions, the update-before-capture order, first-zero
// encoding, MSB-aligned read data, the stall rules and the busy flag. This
// design's choices: a write also waits for actions that are only scheduled,
// PSLVERR for an unmapped index, a write to a read-only or
// a read of a write-only register; the Read register is cleared when a write
// is accepted; reset values are zero (IR zero selects nothing).
module apb_module
  import ijtag_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH = 16,
  parameter instr_t      IDX_IJTAG  = INSTR_IJTAG,
  parameter instr_t      IDX_SIB    = INSTR_SIB,
  parameter instr_t      IDX_EXCFG  = INSTR_EXCFG
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // APB slave
  input  logic                  psel,
  input  logic                  penable,
  input  logic                  pwrite,
  input  logic [ADDR_WIDTH-1:0] paddr,
  input  logic [15:0]           pwdata,
  output logic [15:0]           prdata,
  output logic                  pready,
  output logic                  pslverr,
  // JTAG-TAP-Interface and JTAG-TDR-Interfaces: [0]=IJTAG [1]=SIB [2]=EXCFG
  output jtag_tap_t             tap,
  output logic [2:0]            ext_select,
  input  logic [2:0]            ext_so,
  output logic                  busy,
  output instr_t                ir_o
);
  typedef enum logic [1:0] {ST_IDLE, ST_SHIFT, ST_ACTIONS} state_e;

  // ---- register data bus ---------------------------------------------------
  logic [2:0]  addr;
  logic [15:0] wdata, rdata;
  logic        rd_en, wr_en, wr_req, rd_req, bus_err, stall;

  apb2csc_bridge #(.ADDR_WIDTH(ADDR_WIDTH), .DATA_WIDTH(16)) u_bridge (
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .addr, .data_in(wdata), .rd_en, .wr_en, .wr_req, .rd_req,
    .data_out(rdata), .error(bus_err), .stall
  );

  // ---- state -----------------------------------------------------------------
  state_e      state, state_n;
  instr_t      ir_q, ir_cache;
  logic        instr_sched;           // InstructionScheduled
  logic [1:0]  act_q;                 // pending actions
  logic [15:0] wr_data_q;             // cached shift data
  logic        write_pending;         // Write
  logic        full_q;                // shifting every bit (WriteF)
  logic        zero_seen;             // WriteP: first zero already serialised
  logic [3:0]  cnt;                   // bit being serialised
  logic [15:0] read_buf;
  logic        ctrl_q;

  // decoded accesses
  logic wr_instr_req, wr_act_req, wr_shift_req, rd_read_req;
  assign wr_instr_req = wr_req && addr == REG_INSTRUCTION;
  assign wr_act_req   = wr_req && addr == REG_ACTION;
  assign wr_shift_req = wr_req && (addr == REG_WRITEF || addr == REG_WRITEP);
  assign rd_read_req  = rd_req && addr == REG_READ;

  logic act_sched;                    // ActionScheduled
  assign act_sched = |act_q;

  always_comb begin
    stall = 1'b0;
    if (wr_instr_req && act_sched)                                        stall = 1'b1;
    if (wr_act_req && instr_sched)                                        stall = 1'b1;
    if (wr_shift_req && (write_pending || act_sched || state != ST_IDLE)) stall = 1'b1;
    if (rd_read_req && (write_pending || state == ST_SHIFT))              stall = 1'b1;
  end

  // accepted writes
  logic wr_instr, wr_act, wr_shift;
  assign wr_instr = wr_en && addr == REG_INSTRUCTION;
  assign wr_act   = wr_en && addr == REG_ACTION;
  assign wr_shift = wr_en && (addr == REG_WRITEF || addr == REG_WRITEP);

  // instruction applied directly (Idle, nothing pending) or held
  logic set_direct;
  assign set_direct = wr_instr && state == ST_IDLE && !write_pending;

  // actions: pending set merged with a write in this cycle (Action)
  logic [1:0] act_eff;
  assign act_eff = act_q | (wr_act ? wdata[1:0] : 2'b00);

  // ---- state machine outputs ---------------------------------------------------
  logic set_instr, start_actions, do_actions, end_actions, start_shift, do_shift, last_shift;
  logic last_action, act_bit;   // act_bit: 1 = update, 0 = capture
  always_comb begin
    state_n       = state;
    set_instr     = 1'b0;
    start_actions = 1'b0;
    do_actions    = 1'b0;
    end_actions   = 1'b0;
    start_shift   = 1'b0;
    do_shift      = 1'b0;
    last_action   = (act_eff == 2'b01) || (act_eff == 2'b10);
    act_bit       = act_eff[ACT_UPDATE];
    last_shift    = (cnt == 4'd15);
    unique case (state)
      ST_IDLE: begin
        if (instr_sched || set_direct) begin
          set_instr = 1'b1;
        end else if (act_eff != 2'b00) begin
          start_actions = 1'b1;
          if (last_action) end_actions = 1'b1;
          else             state_n     = ST_ACTIONS;
        end else if (write_pending) begin
          start_shift = 1'b1;
          state_n     = ST_SHIFT;
        end
      end
      ST_SHIFT: begin
        do_shift = 1'b1;
        if (last_shift) state_n = ST_IDLE;
      end
      ST_ACTIONS: begin
        do_actions = 1'b1;
        if (last_action || act_eff == 2'b00) begin
          end_actions = 1'b1;
          state_n     = ST_IDLE;
        end
      end
      default: state_n = ST_IDLE;
    endcase
  end

  logic serialising, cur_bit, shift_en, run_action;
  assign serialising = start_shift || do_shift;
  assign cur_bit     = wr_data_q[cnt];
  assign shift_en    = serialising && (full_q || zero_seen);
  assign run_action  = (start_actions || do_actions) && act_eff != 2'b00;

  // ---- selects and serial output -------------------------------------------------
  always_comb begin
    ext_select[0] = (ir_q == IDX_IJTAG);
    ext_select[1] = (ir_q == IDX_SIB);
    ext_select[2] = (ir_q == IDX_EXCFG);
  end
  logic so_sel;
  assign so_sel = |(ext_select & ext_so);

  assign tap = '{rise: 1'b1, fall: 1'b1,
                 capture: run_action && !act_bit,
                 shift:   shift_en,
                 update:  run_action && act_bit,
                 si:      cur_bit};

  // ---- sequential ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= ST_IDLE;
      ir_q          <= '0;
      ir_cache      <= '0;
      instr_sched   <= 1'b0;
      act_q         <= '0;
      wr_data_q     <= '0;
      write_pending <= 1'b0;
      full_q        <= 1'b0;
      zero_seen     <= 1'b0;
      cnt           <= '0;
      read_buf      <= '0;
      ctrl_q        <= 1'b0;
    end else begin
      state <= state_n;

      // instruction circuit
      if (wr_instr && !set_direct) begin
        ir_cache    <= wdata[IR_LEN-1:0];
        instr_sched <= 1'b1;
      end else if (set_instr && instr_sched) begin
        ir_q        <= ir_cache;
        instr_sched <= 1'b0;
      end
      if (set_direct) ir_q <= wdata[IR_LEN-1:0];

      // action circuit: clear the executed bit, keep the rest
      if (run_action) act_q <= act_bit ? (act_eff & 2'b01) : 2'b00;
      else            act_q <= act_eff;

      // data serialisation circuit
      if (wr_shift) begin
        wr_data_q     <= wdata;
        write_pending <= 1'b1;
        full_q        <= (addr == REG_WRITEF);
        zero_seen     <= 1'b0;
        read_buf      <= '0;
        cnt           <= '0;
      end else if (serialising) begin
        write_pending <= 1'b0;
        cnt           <= cnt + 4'd1;
        if (!cur_bit) zero_seen <= 1'b1;
        if (shift_en) read_buf <= {so_sel, read_buf[15:1]};
      end

      if (wr_en && addr == REG_CONTROL) ctrl_q <= wdata[0];
    end
  end

  assign busy = (state != ST_IDLE) || write_pending || act_sched || instr_sched;
  assign ir_o = ir_q;

  // ---- read data and errors --------------------------------------------------------
  always_comb begin
    rdata   = '0;
    bus_err = 1'b0;
    unique case (addr)
      REG_INSTRUCTION: rdata = 16'(ir_q);
      REG_ACTION:      bus_err = rd_req;
      REG_WRITEF:      bus_err = rd_req;
      REG_WRITEP:      bus_err = rd_req;
      REG_READ:        begin rdata = read_buf; bus_err = wr_req; end
      REG_CONTROL:     rdata = {15'd0, ctrl_q};
      REG_STATUS:      begin rdata = {15'd0, busy}; bus_err = wr_req; end
      default:         bus_err = 1'b1;
    endcase
  end

  // ---- protocol rules ----------------------------------------------------------------
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({tap.capture, tap.shift, tap.update}))
    else $error("apb_module: more than one scan enable");
  assert property (@(posedge clk) disable iff (!rst_n) !(instr_sched && act_sched))
    else $error("apb_module: instruction and actions scheduled together");
  assert property (@(posedge clk) disable iff (!rst_n) penable |-> psel)
    else $error("apb_module: PENABLE without PSEL");
endmodule
