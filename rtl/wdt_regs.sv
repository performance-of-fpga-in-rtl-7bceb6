// wdt_regs: processor bus interface and configuration register.
//
// The processor reaches the watchdog through a small asynchronous-style bus:
// ENABLE (chip select), RD/WR (1 = read, 0 = write), ABUS and a 16-bit DBUS,
// here split into dbus_i, dbus_o and dbus_oe for the pad's tristate driver.
// Two registers are decoded:
//   ADDR_CONFIG (0): configuration and status register
//     [1:0]  FWLEN   RW  frame window length select (lockable)
//     [3:2]  SWLEN   RW  service window length select (lockable)
//     [4]    WDRST   RW  rising edge arms the watchdog
//     [5]    WDSRVC  RW  rising edge services the watchdog
//     [7:6]  SWSTAT  RO  {window missed, service window open}
//     [8]    WDFAIL  RO  watchdog fail output
//     [10:9] FLSTAT  RO  failure mode of the last failure
//     [11]   INIT    RO  state of the INIT input
//   ADDR_UNLOCK (1): unlock register, write 0xAAAA then 0x5555; reads return
//     the unlock sequence state in bits [1:0].
// Other addresses read as zero and ignore writes.
//
// The field names follow the original specification; their positions, the address map and
// the read-back of the unlock state are this implementation's own. The status
// fields are not stored here: a read returns their current values. FWLEN/SWLEN take a write
// only while len_we (from wdt_unlock) is high.
//
// Timing: a write takes effect at the SYSCLK edge on which enable = 1 and
// rd_wr = 0, so each write must last exactly one SYSCLK cycle (the bus is
// assumed synchronous to SYSCLK). Reads are combinational from the address.
module wdt_regs
  import wdt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // processor bus
  input  logic       enable,
  input  logic       rd_wr,
  input  addr_t      abus,
  input  data_t      dbus_i,
  output data_t      dbus_o,
  output logic       dbus_oe,
  // control fields
  output len_sel_t   fwlen,
  output len_sel_t   swlen,
  output logic       wdrst,
  output logic       wdsrvc,
  // write strobes to the unlock logic
  output logic       cfg_wr,
  output logic       unlock_wr,
  output data_t      wdata,
  input  logic       len_we,
  input  logic [1:0] unlock_state,
  // status fields
  input  swstat_t    swstat,
  input  logic       wdfail,
  input  fail_mode_e flstat,
  input  logic       init_level
);
  logic  wr;
  data_t cfg_rd;

  assign wr        = enable && !rd_wr;
  assign cfg_wr    = wr && (abus == ADDR_CONFIG);
  assign unlock_wr = wr && (abus == ADDR_UNLOCK);
  assign wdata     = dbus_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwlen  <= '0;
      swlen  <= '0;
      wdrst  <= 1'b0;
      wdsrvc <= 1'b0;
    end else if (cfg_wr) begin
      wdrst  <= dbus_i[CFG_WDRST];
      wdsrvc <= dbus_i[CFG_WDSRVC];
      if (len_we) begin
        fwlen <= dbus_i[CFG_FWLEN_LSB +: LEN_SEL_W];
        swlen <= dbus_i[CFG_SWLEN_LSB +: LEN_SEL_W];
      end
    end
  end

  always_comb begin
    cfg_rd = '0;
    cfg_rd[CFG_FWLEN_LSB +: LEN_SEL_W] = fwlen;
    cfg_rd[CFG_SWLEN_LSB +: LEN_SEL_W] = swlen;
    cfg_rd[CFG_WDRST]                  = wdrst;
    cfg_rd[CFG_WDSRVC]                 = wdsrvc;
    cfg_rd[CFG_SWSTAT_LSB +: 2]        = swstat;
    cfg_rd[CFG_WDFAIL]                 = wdfail;
    cfg_rd[CFG_FLSTAT_LSB +: 2]        = flstat;
    cfg_rd[CFG_INIT]                   = init_level;
  end

  assign dbus_oe = enable && rd_wr;

  always_comb begin
    dbus_o = '0;
    if (dbus_oe) begin
      unique case (abus)
        ADDR_CONFIG: dbus_o = cfg_rd;
        ADDR_UNLOCK: dbus_o = data_t'(unlock_state);
        default:     dbus_o = '0;
      endcase
    end
  end
endmodule
