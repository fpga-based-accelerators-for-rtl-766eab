// crypto_accel_top: reconfigurable cryptography accelerator slot.
//
// The design keeps one reconfigurable region between a DMA (which streams
// 64-bit words in and out of memory) and a GPIO control register, and loads
// into it either the RSA accelerator, the Blowfish accelerator or a blank
// module, whichever the application needs at the moment. This top models
// that slot: both accelerators are present, rm_sel says which one is
// "loaded", and only that one is connected to the stream, the control word
// and the interrupt; the other is held in reset. The blank module drives
// every output low (s_tready too, so nothing is taken from the stream).
// As in the document's region, which is reset after every reconfiguration,
// a change of rm_sel holds the newly loaded module in reset for
// RECONFIG_RESET_CYCLES cycles with its outputs disconnected; the length of
// that window is this design's choice.
//
// Interface: AXI4-Stream style input (s_axis_*, from the DMA read channel),
// output with TLAST (m_axis_*, to the DMA write channel), the 32-bit GPIO
// control word, the interrupt irq (the accelerator's return value), and
// rm_sel (0 blank, 1 RSA, 2 Blowfish). reconfiguring is high while the
// slot is in its post-reconfiguration reset.
module crypto_accel_top
  import crypto_pkg::*;
#(
  parameter int unsigned RSA_W                 = 64,  // RSA key and block width
  parameter int unsigned RECONFIG_RESET_CYCLES = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           rm_sel,
  input  logic [CONTROL_W-1:0] control,
  input  logic [RSA_W-1:0]     s_axis_tdata,
  input  logic                 s_axis_tvalid,
  output logic                 s_axis_tready,
  output logic [RSA_W-1:0]     m_axis_tdata,
  output logic                 m_axis_tvalid,
  input  logic                 m_axis_tready,
  output logic                 m_axis_tlast,
  output logic                 irq,
  output logic                 reconfiguring
);

  localparam int unsigned CW = $clog2(RECONFIG_RESET_CYCLES + 1);

  rm_sel_e       loaded;        // module currently in the region
  logic [CW-1:0] rr_count;      // post-reconfiguration reset counter
  logic          rsa_rst_n, bf_rst_n;

  // reconfiguration: register the selection, then reset the region
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loaded   <= RM_BLANK;
      rr_count <= CW'(RECONFIG_RESET_CYCLES);
    end else if (rm_sel_e'(rm_sel) != loaded) begin
      loaded   <= rm_sel_e'(rm_sel);
      rr_count <= CW'(RECONFIG_RESET_CYCLES);
    end else if (rr_count != '0) begin
      rr_count <= rr_count - 1'b1;
    end
  end

  assign reconfiguring = (rr_count != '0);

  // synchronous reset release of the loaded module
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsa_rst_n <= 1'b0;
      bf_rst_n  <= 1'b0;
    end else begin
      rsa_rst_n <= (loaded == RM_RSA)      && !reconfiguring && (rm_sel_e'(rm_sel) == loaded);
      bf_rst_n  <= (loaded == RM_BLOWFISH) && !reconfiguring && (rm_sel_e'(rm_sel) == loaded);
    end
  end

  // ------------------------------------------------------------- RSA module
  logic                rsa_s_tready, rsa_m_tvalid, rsa_m_tlast, rsa_irq;
  logic [RSA_W-1:0]    rsa_m_tdata;
  logic                rsa_on;

  assign rsa_on = rsa_rst_n;

  rsa_accel #(.W(RSA_W)) u_rsa (
    .clk, .rst_n(rsa_rst_n), .control,
    .s_tdata(s_axis_tdata), .s_tvalid(s_axis_tvalid && rsa_on), .s_tready(rsa_s_tready),
    .m_tdata(rsa_m_tdata), .m_tvalid(rsa_m_tvalid), .m_tready(m_axis_tready && rsa_on),
    .m_tlast(rsa_m_tlast), .irq(rsa_irq)
  );

  // -------------------------------------------------------- Blowfish module
  logic                bf_s_tready, bf_m_tvalid, bf_m_tlast, bf_irq;
  logic [63:0]         bf_m_tdata;
  logic                bf_on;

  assign bf_on = bf_rst_n;

  blowfish_accel u_blowfish (
    .clk, .rst_n(bf_rst_n), .control,
    .s_tdata(s_axis_tdata[63:0]), .s_tvalid(s_axis_tvalid && bf_on), .s_tready(bf_s_tready),
    .m_tdata(bf_m_tdata), .m_tvalid(bf_m_tvalid), .m_tready(m_axis_tready && bf_on),
    .m_tlast(bf_m_tlast), .irq(bf_irq)
  );

  // ------------------------------------------------ region output selection
  always_comb begin
    s_axis_tready = 1'b0;
    m_axis_tdata  = '0;
    m_axis_tvalid = 1'b0;
    m_axis_tlast  = 1'b0;
    irq           = 1'b0;
    if (rsa_on) begin
      s_axis_tready = rsa_s_tready;
      m_axis_tdata  = rsa_m_tdata;
      m_axis_tvalid = rsa_m_tvalid;
      m_axis_tlast  = rsa_m_tlast;
      irq           = rsa_irq;
    end else if (bf_on) begin
      s_axis_tready = bf_s_tready;
      m_axis_tdata  = RSA_W'(bf_m_tdata);
      m_axis_tvalid = bf_m_tvalid;
      m_axis_tlast  = bf_m_tlast;
      irq           = bf_irq;
    end
  end

  initial assert (RSA_W >= 64)
    else $fatal(1, "crypto_accel_top: the stream must carry a 64-bit Blowfish block");

endmodule
