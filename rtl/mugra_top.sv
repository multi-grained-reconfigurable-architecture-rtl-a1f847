// mugra_top: accelerator side of the MuGRA system (the FPGA coprocessor).
//
// MuGRA (multi-grained reconfigurable architecture) computes arbitrary
// functions approximately by cutting one large array of neural-network PEs,
// wired as a bisection neural network, into many small BNN kernels that run
// side by side, each a fully pipelined function evaluator. This module joins:
//   instr_buffer   program written by the host;
//   config_buffer  PE configuration entries written by the host;
//   fsm_controller six-state controller with instruction decoder;
//   pe_array       ROWS x COLS PEs in bisection topology;
//   bank_group     one per group of GROUP_ROWS PEs in a column: shares one
//                  input bank and one output bank among them;
//   data_buffer    double-buffered input and output banks with a DMA port.
// The host processor, its bus, the DMA engine and the DRAM lie outside: their
// side of each buffer is a plain port here.
//
// Operation: the host writes a program and configuration entries, raises
// cb_ready and enable. A CONFIG instruction broadcasts the entries into the
// PE configuration registers (one per cycle). For each COMPUTE the DMA first
// fills the input banks and pulses dma_ib_done; the controller swaps the
// halves and streams n samples, one per clock, into every input PE at once;
// output PEs write their results into their group's output bank; at the end
// the output halves swap and store_req asks the DMA to drain them
// (dma_ob_done when finished). A kernel of d layers returns the result of a
// sample d-1 cycles after its input registers take it.
module mugra_top
  import mugra_pkg::*;
#(
  parameter int ROWS       = 28,
  parameter int COLS       = 28,
  parameter int GROUP_ROWS = 4,
  parameter int BANK_DEPTH = 2304,
  parameter int CB_DEPTH   = 1024,
  parameter int IB_DEPTH   = 256,
  localparam int NPE       = ROWS * COLS,
  localparam int NGRP      = ROWS / GROUP_ROWS,
  localparam int NBANK     = NGRP * COLS,
  localparam int BW        = (NBANK > 1) ? $clog2(NBANK) : 1,
  localparam int AW        = $clog2(BANK_DEPTH / 2),
  localparam int CB_AW     = $clog2(CB_DEPTH),
  localparam int IB_AW     = $clog2(IB_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // host control
  input  logic               enable,
  input  logic               cb_ready,
  output state_e             state,
  output logic               done,
  output logic               conflict,
  // host writes
  input  logic               host_ib_we,
  input  logic [IB_AW-1:0]   host_ib_addr,
  input  logic [INSTR_W-1:0] host_ib_wdata,
  input  logic               host_cb_we,
  input  logic [CB_AW-1:0]   host_cb_addr,
  input  cb_entry_t          host_cb_wdata,
  // DMA, input side
  input  logic               dma_ib_we,
  input  logic [BW-1:0]      dma_ib_bank,
  input  logic [AW-1:0]      dma_ib_addr,
  input  logic [NW-1:0]      dma_ib_wdata,
  input  logic               dma_ib_done,
  output logic               ib_full,
  // DMA, output side
  output logic               store_req,
  output logic [CNT_W-1:0]   store_count,
  input  logic [BW-1:0]      dma_ob_bank,
  input  logic [AW-1:0]      dma_ob_addr,
  output logic [NW-1:0]      dma_ob_rdata,
  input  logic               dma_ob_done,
  output logic               ob_free
);

  // ---------------------------------------------------------------- buffers
  logic [IB_AW-1:0]   instr_addr;
  logic [INSTR_W-1:0] instr_rdata;
  logic [CB_AW-1:0]   cb_addr;
  cb_entry_t          cb_rdata;

  instr_buffer #(.DEPTH(IB_DEPTH)) u_inb (
    .clk        (clk),
    .host_we    (host_ib_we),
    .host_addr  (host_ib_addr),
    .host_wdata (host_ib_wdata),
    .rd_addr    (instr_addr),
    .rd_data    (instr_rdata)
  );

  config_buffer #(.DEPTH(CB_DEPTH)) u_cb (
    .clk        (clk),
    .host_we    (host_cb_we),
    .host_addr  (host_cb_addr),
    .host_wdata (host_cb_wdata),
    .rd_addr    (cb_addr),
    .rd_data    (cb_rdata)
  );

  // ------------------------------------------------------------- controller
  logic            cfg_we;
  logic [ID_W-1:0] cfg_id;
  pe_cfg_t         cfg_data;
  logic            ib_swap, ob_swap, rd_en, array_busy;
  logic [AW-1:0]   rd_addr;

  fsm_controller #(.IB_AW(IB_AW), .CB_AW(CB_AW), .AW(AW)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .enable      (enable),
    .cb_ready    (cb_ready),
    .instr_addr  (instr_addr),
    .instr_rdata (instr_rdata),
    .cb_addr     (cb_addr),
    .cb_rdata    (cb_rdata),
    .cfg_we      (cfg_we),
    .cfg_id      (cfg_id),
    .cfg_data    (cfg_data),
    .ib_full     (ib_full),
    .ob_free     (ob_free),
    .ib_swap     (ib_swap),
    .ob_swap     (ob_swap),
    .rd_en       (rd_en),
    .rd_addr     (rd_addr),
    .store_req   (store_req),
    .store_count (store_count),
    .array_busy  (array_busy),
    .state       (state),
    .done        (done)
  );

  // ---------------------------------------------------------------- PE array
  logic [NPE-1:0][NW-1:0] pe_ib_data, pe_ob_data;
  logic [NPE-1:0]         pe_ib_valid, pe_ob_valid, pe_rd, pe_wr;

  pe_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_we   (cfg_we),
    .cfg_id   (cfg_id),
    .cfg_data (cfg_data),
    .ib_data  (pe_ib_data),
    .ib_valid (pe_ib_valid),
    .ob_data  (pe_ob_data),
    .ob_valid (pe_ob_valid),
    .rd       (pe_rd),
    .wr       (pe_wr),
    .busy     (array_busy)
  );

  // ------------------------------------------- group interconnect and banks
  logic [NBANK-1:0][NW-1:0] bank_rdata, bank_wdata;
  logic [NBANK-1:0]         bank_we, bank_conflict;
  logic                     bank_rvalid;

  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int B = g * COLS + c;
      logic [GROUP_ROWS-1:0][NW-1:0] gi_data, go_data;
      logic [GROUP_ROWS-1:0]         gi_valid, go_valid, g_rd;

      for (genvar k = 0; k < GROUP_ROWS; k++) begin : g_pe
        localparam int P = (g * GROUP_ROWS + k) * COLS + c;
        assign pe_ib_data[P]  = gi_data[k];
        assign pe_ib_valid[P] = gi_valid[k];
        assign go_data[k]     = pe_ob_data[P];
        assign go_valid[k]    = pe_ob_valid[P];
        assign g_rd[k]        = pe_rd[P];
      end

      bank_group #(.NW(NW), .GROUP_ROWS(GROUP_ROWS)) u_grp (
        .bank_rdata  (bank_rdata[B]),
        .bank_rvalid (bank_rvalid),
        .pe_rd       (g_rd),
        .pe_ib_data  (gi_data),
        .pe_ib_valid (gi_valid),
        .pe_ob_data  (go_data),
        .pe_ob_valid (go_valid),
        .bank_wdata  (bank_wdata[B]),
        .bank_we     (bank_we[B]),
        .conflict    (bank_conflict[B])
      );
    end
  end

  assign conflict = |bank_conflict;

  data_buffer #(
    .NW(NW), .ROWS(ROWS), .COLS(COLS), .GROUP_ROWS(GROUP_ROWS), .DEPTH(BANK_DEPTH)
  ) u_db (
    .clk          (clk),
    .rst_n        (rst_n),
    .ib_swap      (ib_swap),
    .ob_swap      (ob_swap),
    .ib_full      (ib_full),
    .ob_free      (ob_free),
    .rd_en        (rd_en),
    .rd_addr      (rd_addr),
    .ib_rdata     (bank_rdata),
    .ib_rvalid    (bank_rvalid),
    .ob_we        (bank_we),
    .ob_wdata     (bank_wdata),
    .dma_ib_we    (dma_ib_we),
    .dma_ib_bank  (dma_ib_bank),
    .dma_ib_addr  (dma_ib_addr),
    .dma_ib_wdata (dma_ib_wdata),
    .dma_ib_done  (dma_ib_done),
    .dma_ob_bank  (dma_ob_bank),
    .dma_ob_addr  (dma_ob_addr),
    .dma_ob_rdata (dma_ob_rdata),
    .dma_ob_done  (dma_ob_done)
  );

  // pe_wr is only needed inside the groups through pe_ob_valid
  logic unused_wr;
  assign unused_wr = ^pe_wr;

endmodule
