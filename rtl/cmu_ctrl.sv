// cmu_ctrl: control module of the cache management unit.
//
// Moves one action's KV block (SLOT_LINES lines) between off-chip memory and
// its slot in Endor-NMP, through a read buffer (off-chip -> Endor-NMP) and a
// write buffer (Endor-NMP -> off-chip), as in the CMU figure.
//   LOAD  id -> slot : read requests for off-chip lines id*SLOT_LINES + i are
//                      issued as long as the read buffer has room for the
//                      reply; replies are queued and drained into the slot.
//   STORE slot -> id : slot lines are read from the shared buffer into the
//                      write buffer and drained as off-chip write requests.
// `done` pulses when the last line has been written at its destination.
// Off-chip requests use valid/ready; read data returns on `om_rvalid` in
// request order, with any latency. The shared-buffer port has one cycle of
// read latency. The buffers and their direction follow the figure; their depth
// and the interfaces are choices of this implementation. The off-chip line
// address is 32 bits wide so the port fits a large off-chip memory; with 128
// action IDs of SLOT_LINES lines only its low bits are used, and synthesis
// reports the upper bits as constant zero.
module cmu_ctrl
  import endor_pkg::*;
#(
  parameter int unsigned SLOT_L = SLOT_LINES,
  parameter int unsigned SLOTS  = NUM_SLOTS,
  parameter int unsigned BUF_D  = 8,
  localparam int unsigned SBW   = $clog2(SLOT_L * SLOTS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     is_store,
  input  id_t                      id,
  input  logic [$clog2(SLOTS)-1:0] slot,
  output logic                     busy,
  output logic                     done,
  // off-chip memory
  output logic                     om_req_valid,
  input  logic                     om_req_ready,
  output logic                     om_req_we,
  output logic [31:0]              om_req_addr,
  output line_t                    om_req_wdata,
  input  logic                     om_rvalid,
  input  line_t                    om_rdata,
  // Endor-NMP side (shared buffer port)
  output logic                     sb_en,
  output logic                     sb_we,
  output logic [SBW-1:0]           sb_addr,
  output line_t                    sb_wdata,
  input  line_t                    sb_rdata
);

  localparam int unsigned LW = $clog2(SLOT_L + 1);
  localparam int unsigned FW = $clog2(BUF_D + 1);

  logic          run, store_q;
  id_t           id_q;
  logic [$clog2(SLOTS)-1:0] slot_q;
  logic [LW-1:0] n_issue;
  logic [FW-1:0] inflight;   // LOAD: requested, not yet in the read buffer
  logic          sb_rd_pend; // STORE: shared-buffer read in flight

  // read buffer: off-chip data on its way into Endor-NMP
  logic  rb_in_ready, rb_out_valid, rb_out_ready;
  line_t rb_out_data;
  logic [FW-1:0] rb_level;
  sync_fifo #(.T(line_t), .DEPTH(BUF_D)) u_read_buf (
    .clk, .rst_n, .in_valid(om_rvalid), .in_ready(rb_in_ready), .in_data(om_rdata),
    .out_valid(rb_out_valid), .out_ready(rb_out_ready), .out_data(rb_out_data), .level(rb_level)
  );

  // write buffer: Endor-NMP data on its way to off-chip memory
  logic  wb_in_valid, wb_in_ready, wb_out_valid, wb_out_ready;
  line_t wb_out_data;
  logic [FW-1:0] wb_level;
  sync_fifo #(.T(line_t), .DEPTH(BUF_D)) u_write_buf (
    .clk, .rst_n, .in_valid(wb_in_valid), .in_ready(wb_in_ready), .in_data(sb_rdata),
    .out_valid(wb_out_valid), .out_ready(wb_out_ready), .out_data(wb_out_data), .level(wb_level)
  );

  logic [LW-1:0] n_drain;   // lines written at the destination
  logic load_issue, store_read;

  always_comb begin
    // LOAD: issue a read while the read buffer can take every reply
    load_issue   = run && !store_q && (n_issue != LW'(SLOT_L))
                   && (32'(inflight) + 32'(rb_level) < BUF_D);
    // STORE: read a slot line while the write buffer has room for it
    store_read   = run && store_q && (n_issue != LW'(SLOT_L))
                   && (32'(wb_level) + 32'(sb_rd_pend) < BUF_D);
    om_req_valid = load_issue || (run && store_q && wb_out_valid);
    om_req_we    = store_q;
    om_req_addr  = store_q ? 32'(id_q) * SLOT_L + 32'(n_drain)
                           : 32'(id_q) * SLOT_L + 32'(n_issue);
    om_req_wdata = wb_out_data;
    wb_out_ready = run && store_q && om_req_ready;
    rb_out_ready = run && !store_q;
    wb_in_valid  = sb_rd_pend;
    sb_en        = rb_out_valid && rb_out_ready || store_read;
    sb_we        = !store_q;
    sb_addr      = SBW'(32'(slot_q) * SLOT_L + (store_q ? 32'(n_issue) : 32'(n_drain)));
    sb_wdata     = rb_out_data;
  end

  assign busy = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; store_q <= 1'b0; id_q <= '0; slot_q <= '0; n_issue <= '0; n_drain <= '0;
      inflight <= '0; sb_rd_pend <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run <= 1'b1; store_q <= is_store; id_q <= id; slot_q <= slot;
          n_issue <= '0; n_drain <= '0; inflight <= '0; sb_rd_pend <= 1'b0;
        end
      end else begin
        sb_rd_pend <= store_read;
        if (!store_q) begin
          if (load_issue && om_req_ready) n_issue <= n_issue + 1'b1;
          inflight <= inflight + FW'(load_issue && om_req_ready) - FW'(om_rvalid);
          if (rb_out_valid) n_drain <= n_drain + 1'b1;
          if (rb_out_valid && n_drain == LW'(SLOT_L - 1)) begin run <= 1'b0; done <= 1'b1; end
        end else begin
          if (store_read) n_issue <= n_issue + 1'b1;
          if (wb_out_valid && om_req_ready) begin
            n_drain <= n_drain + 1'b1;
            if (n_drain == LW'(SLOT_L - 1)) begin run <= 1'b0; done <= 1'b1; end
          end
        end
      end
    end
  end

endmodule
